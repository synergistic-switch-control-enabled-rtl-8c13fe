// tb_switch_controller: the switch controller at its label-channel words.
// Label request words put on the lines at slot phase 650 (the start of the
// inter-packet gap) must be answered by response words at phase 654: 4 clock
// cycles, 12.4 ns at 3.1 ns per word. The SOA gates must take the new
// setting at phase 658 (switched at the end of phase 657) and keep it for
// the whole next packet. Lines without a message carry the idle pattern.
// Uses the first slot of the demonstrated sequence (requests 3,3,4,1 with
// priority 1>2>3>4; 0-based here) and checks a timestamp round trip of
// 3 cycles through the controller.
module tb_switch_controller;
  import ossc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic [31:0] label_rx_word [N], label_tx_word [N];
  logic gate [N][N];
  logic [TIME_W-1:0] ctrl_time;
  logic [9:0] slot_phase;
  logic [31:0] n_arb, n_contention, n_nack, n_reconfig;
  switch_controller #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wait_phase(input int ph);
    do begin @(posedge clk); #0.2; end while (slot_phase != 10'(ph));
  endtask

  initial begin
    int rd [N], ex [N], prev [N];
    int t_req, t_rsp;
    for (int i = 0; i < N; i++) label_rx_word[i] = IDLE_WORD;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      case (s)
        0: begin rd = '{2, 2, 3, 0}; ex = '{2, 1, 3, 0}; end
        1: begin rd = '{1, 2, 0, 1}; ex = '{1, 2, 0, 3}; end
        default: begin rd = '{2, 3, 1, 1}; ex = '{2, 3, 1, 0}; end
      endcase
      wait_phase(PKT_WORDS);
      for (int i = 0; i < N; i++) label_rx_word[i] = {4'h1, 12'd0, 8'(rd[i]), 8'(i + 1)};
      t_req = int'(ctrl_time);
      @(posedge clk); #0.2;
      for (int i = 0; i < N; i++) label_rx_word[i] = IDLE_WORD;
      // look for the responses
      t_rsp = -1;
      for (int c = 0; c < 10 && t_rsp < 0; c++) begin
        if (label_tx_word[0][31:28] == 4'h2) t_rsp = int'(ctrl_time);
        else begin @(posedge clk); #0.2; end
      end
      check(t_rsp - t_req == 4, $sformatf("label processing %0d cycles", t_rsp - t_req));
      check(slot_phase == 10'(PKT_WORDS + 4), "response at phase 654");
      for (int i = 0; i < N; i++)
        check(label_tx_word[i] == {4'h2, 20'd0, 8'(ex[i])},
              $sformatf("response word port %0d: %h", i, label_tx_word[i]));
      @(posedge clk); #0.2;
      for (int i = 0; i < N; i++) check(label_tx_word[i] == IDLE_WORD, "idle after response");
      wait_phase(PKT_WORDS + 7);
      if (s > 0) for (int i = 0; i < N; i++) check(gate[i][prev[i]] == 1'b1, "old gates kept until phase 657");
      prev = ex;
      @(posedge clk); #0.2;
      for (int k = 0; k < PKT_WORDS + 4; k++) begin
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            if (k % 97 == 0) check(gate[i][j] == (ex[i] == j), $sformatf("gate %0d->%0d", i, j));
        @(posedge clk); #0.2;
      end
    end
    check(n_arb == 3 && n_contention == 3 && n_nack == 3, "counters");
    // timestamp round trip through the controller
    wait_phase(50);
    label_rx_word[1] = {4'h3, 28'h00A_BCDE};
    @(posedge clk); #0.2; label_rx_word[1] = IDLE_WORD;
    @(posedge clk); #0.2;
    check(label_tx_word[1] == IDLE_WORD, "echo not yet");
    @(posedge clk); #0.2;
    check(label_tx_word[1] == {4'h4, 28'h00A_BCDE}, "echo 3 cycles after the timestamp");
    @(posedge clk); #0.2;
    check(label_tx_word[1] == {4'h5, ctrl_time - 28'd1}, "time word carries the controller time of the cycle before");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (664 * 10) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
