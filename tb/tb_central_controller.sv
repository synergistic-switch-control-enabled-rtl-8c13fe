// tb_central_controller: arbitration, responses, latency and time service of
// the central controller with 4 ports.
//
// First the three slots of the demonstrated sequence (ToR numbers 1..4 there,
// 0..3 here; priority 1 > 2 > 3 > 4): requests {3,3,4,1}, {2,3,1,2},
// {3,4,2,2} must give responses {3,2,4,1}, {2,3,1,4}, {3,4,2,1}, i.e. ToR 2,
// then ToR 4 twice, refused and sent to the only output nobody asked for.
// Then random requests and priorities against a reference model written
// independently here (sort by key, fill free outputs). Every response must
// be on tx_msg at slot phase PKT_WORDS+3 for requests on rx_msg at phase
// PKT_WORDS+1 (codec registers add one cycle each side: 4 cycles line to
// line). Finally a timestamp must be echoed unchanged one cycle later,
// followed by the controller time.
module tb_central_controller;
  import ossc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  label_msg_t rx_msg [N], tx_msg [N];
  logic [TIME_W-1:0] ctrl_time;
  logic [9:0] slot_phase;
  logic cfg_valid;
  logic [1:0] cfg_src [N];
  logic [31:0] n_arb, n_contention, n_nack;
  central_controller #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: returns output per input (-1: no request) and the source per output
  task automatic ref_arb(input bit rv [N], input int rd [N], input int rp [N],
                         output int out_of [N], output int src_of [N], output int nack);
    bit used_in [N]; bit used_out [N];
    int left [$];
    nack = 0;
    for (int i = 0; i < N; i++) begin used_in[i] = 0; used_out[i] = 0; out_of[i] = -1; end
    for (int j = 0; j < N; j++) begin
      int best, bk;
      best = -1; bk = 1 << 30;
      for (int i = 0; i < N; i++)
        if (rv[i] && rd[i] == j && rp[i] * 64 + i < bk) begin bk = rp[i] * 64 + i; best = i; end
      src_of[j] = best;
      if (best >= 0) begin used_in[best] = 1; used_out[j] = 1; out_of[best] = j; end
    end
    for (int i = 0; i < N; i++) if (rv[i] && !used_in[i]) begin left.push_back(i); nack++; end
    for (int i = 0; i < N; i++) if (!rv[i]) left.push_back(i);
    for (int j = 0; j < N; j++) if (!used_out[j]) begin
      src_of[j] = left.pop_front();
      out_of[src_of[j]] = j;
    end
  endtask

  task automatic wait_phase(input int ph);
    do begin @(posedge clk); #0.2; end while (slot_phase != 10'(ph));
  endtask

  task automatic run_slot(input bit rv [N], input int rd [N], input int rp [N], input int exp_rsp [N]);
    int out_of [N], src_of [N], nk;
    int nack0;
    ref_arb(rv, rd, rp, out_of, src_of, nk);
    wait_phase(PKT_WORDS + 1);       // drive during phase PKT_WORDS+1
    for (int i = 0; i < N; i++) rx_msg[i] = rv[i] ? make_req(8'(rd[i]), 8'(rp[i])) : LABEL_NONE;
    nack0 = int'(n_nack);
    @(posedge clk); #0.2;            // phase PKT_WORDS+2: arbitration
    for (int i = 0; i < N; i++) rx_msg[i] = LABEL_NONE;
    for (int i = 0; i < N; i++) check(!tx_msg[i].valid, "no early response");
    @(posedge clk); #0.2;            // phase PKT_WORDS+3
    check(slot_phase == 10'(PKT_WORDS + 3) && cfg_valid, "response phase");
    for (int i = 0; i < N; i++) begin
      if (rv[i]) begin
        check(tx_msg[i].valid && tx_msg[i].ltype == LT_RSP &&
              int'(tx_msg[i].payload[7:0]) == out_of[i],
              $sformatf("response of port %0d: %0d expected %0d", i, tx_msg[i].payload[7:0], out_of[i]));
        if (exp_rsp[i] >= 0) check(out_of[i] == exp_rsp[i], "reference agrees with demonstrated sequence");
      end else check(!tx_msg[i].valid, "no response without request");
      check(int'(cfg_src[i]) == src_of[i], $sformatf("gate source of output %0d", i));
    end
    @(posedge clk); #0.2;
    check(int'(n_nack) == nack0 + nk, "NACK count");
    for (int i = 0; i < N; i++) check(!tx_msg[i].valid, "single response");
  endtask

  initial begin
    bit rv [N]; int rd [N], rp [N], ex [N];
    for (int i = 0; i < N; i++) rx_msg[i] = LABEL_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // demonstrated sequence (0-based)
    rv = '{1, 1, 1, 1}; rp = '{1, 2, 3, 4};
    rd = '{2, 2, 3, 0}; ex = '{2, 1, 3, 0}; run_slot(rv, rd, rp, ex);
    rd = '{1, 2, 0, 1}; ex = '{1, 2, 0, 3}; run_slot(rv, rd, rp, ex);
    rd = '{2, 3, 1, 1}; ex = '{2, 3, 1, 0}; run_slot(rv, rd, rp, ex);
    check(n_contention == 3 && n_arb == 3, "contention counted");
    // random slots
    for (int s = 0; s < 60; s++) begin
      for (int i = 0; i < N; i++) begin
        rv[i] = ($urandom_range(0, 4) != 0);
        rd[i] = int'($urandom_range(0, N - 1));
        rp[i] = int'($urandom_range(0, 3));
        ex[i] = -1;
      end
      run_slot(rv, rd, rp, ex);
    end
    // timestamp echo and time distribution
    wait_phase(100);
    rx_msg[2] = '{valid: 1'b1, ltype: LT_TS, payload: 28'h123_4567};
    @(posedge clk); #0.2 rx_msg[2] = LABEL_NONE;
    check(tx_msg[2].valid && tx_msg[2].ltype == LT_TS_ECHO && tx_msg[2].payload == 28'h123_4567, "echo");
    check(!tx_msg[1].valid, "echo only to the asking port");
    @(posedge clk); #0.2;
    check(tx_msg[2].valid && tx_msg[2].ltype == LT_TIME && tx_msg[2].payload == ctrl_time, "time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (664 * 80) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
