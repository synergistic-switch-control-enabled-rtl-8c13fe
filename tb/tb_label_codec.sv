// tb_label_codec: random label messages and line words through the label
// packet dis/aggregator. Checks the word layout {type, payload}, the idle
// pattern when there is no message, the one-cycle latency both ways and that
// idle or unknown words decode to "no message".
module tb_label_codec;
  import ossc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  label_msg_t  tx_msg, rx_msg;
  logic [31:0] tx_word, rx_word;
  label_codec dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] exp_word, w;
    logic        exp_valid;
    tx_msg = LABEL_NONE; rx_word = IDLE_WORD;
    repeat (3) @(posedge clk);
    #0.5 check(tx_word == IDLE_WORD && !rx_msg.valid, "reset state");
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      tx_msg.valid   = ($urandom_range(0, 3) != 0);
      tx_msg.ltype   = label_type_e'($urandom_range(1, 5));
      tx_msg.payload = 28'($urandom);
      case ($urandom_range(0, 3))
        0: w = IDLE_WORD;
        1: w = {4'($urandom_range(6, 15)), 28'($urandom)};
        default: w = {4'($urandom_range(1, 5)), 28'($urandom)};
      endcase
      rx_word   = w;
      exp_word  = tx_msg.valid ? {4'(tx_msg.ltype), tx_msg.payload} : 32'hAAAA_AAAA;
      exp_valid = (w[31:28] >= 1 && w[31:28] <= 5);
      @(posedge clk); #0.5;
      check(tx_word == exp_word, $sformatf("tx word %h exp %h", tx_word, exp_word));
      check(rx_msg.valid == exp_valid, "rx valid");
      if (exp_valid) check(4'(rx_msg.ltype) == w[31:28] && rx_msg.payload == w[27:0], "rx fields");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
