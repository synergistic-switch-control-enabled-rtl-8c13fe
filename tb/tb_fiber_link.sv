// tb_fiber_link: a random word stream through a 7-cycle fibre; checks the
// delay, the idle pattern before the first word arrives, and a zero-delay
// link, and a 7-cycle link 5 bit times longer (each word made of the last
// 5 bits of the word before and the first 27 bits of its own).
module tb_fiber_link;
  import ossc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic [31:0] in_word, out7, out0, out7b;
  fiber_link #(.DELAY(7)) dut  (.clk, .rst_n, .in_word, .out_word (out7));
  fiber_link #(.DELAY(0)) dut0 (.clk, .rst_n, .in_word, .out_word (out0));
  fiber_link #(.DELAY(7), .BIT_DELAY(5)) dutb (.clk, .rst_n, .in_word, .out_word (out7b));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] hist [$];
  initial begin
    in_word = IDLE_WORD;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_word = $urandom;
      hist.push_back(in_word);
      #0.1 check(out0 == in_word, "zero delay");
      if (hist.size() <= 7) check(out7 == IDLE_WORD, "idle before arrival");
      else check(out7 == hist[hist.size() - 8], $sformatf("delayed word %0d", n));
      if (hist.size() >= 9)
        check(out7b == {hist[hist.size() - 9][4:0], hist[hist.size() - 8][31:5]}, $sformatf("bit-delayed word %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
