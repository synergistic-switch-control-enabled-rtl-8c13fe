// tb_ossc_cluster: end-to-end test of one cluster at the default sizes
// (4 ToR switches, 650-word packets, 664-cycle slots).
//
// Each rack's servers send Ethernet frames (64..1518 bytes) to random racks,
// the own rack included. Phase 1 is uniform traffic at moderate load, phase 2
// sends everything to rack 0 at full line rate (contention every slot and
// buffer overflow), phase 3 lets the buffers drain. Every frame carries its
// source and sequence number and a payload derived from them; the checker at
// each rack's server port verifies destination, content, length and order
// per source, and at the end that every frame sent was delivered exactly once
// or counted as dropped by a full buffer block. It also checks the measured
// fibre delays and that each mechanism (time sync, contention, NACK,
// retransmission, filler packets to other racks, gate reconfiguration,
// intra-rack forwarding, overflow drop, empty slots) happened.
module tb_ossc_cluster;
  import ossc_pkg::*;

  localparam int N = 4;
  localparam int NB = N - 1;
  localparam int MAXSEQ = 4096;
  localparam int BASE_DELAY = 5;
  localparam int DELAY_STEP = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic [7:0]        tor_prio [N];
  logic              srv_in_valid [N];
  frame_beat_t       srv_in_beat [N];
  logic              srv_in_ready [N];
  logic              srv_out_valid [N];
  frame_beat_t       srv_out_beat [N];
  logic              tor_synced [N];
  logic [15:0]       tor_link_delay [N];
  logic [31:0]       tor_occ_bytes [N][NB];
  logic [31:0]       tor_n_req [N], tor_n_ack [N], tor_n_nack [N], tor_n_retx [N];
  logic [31:0]       tor_n_drop [N], tor_n_pkt_tx [N], tor_n_rx_ok [N];
  logic [31:0]       tor_n_rx_foreign [N], tor_n_rx_crc_err [N];
  logic [31:0]       tor_n_intra [N], tor_n_inter [N];
  logic [31:0]       tor_n_unknown [N], tor_n_release [N], tor_n_rx_overflow [N], tor_n_rx_align [N];
  logic [TIME_W-1:0] tor_local_time [N];
  logic [TIME_W-1:0] ctrl_time;
  logic [9:0]        slot_phase;
  logic              soa_gate [N][N];
  logic [31:0]       n_arb, n_contention, n_nack_ctrl, n_reconfig;

  ossc_cluster dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- traffic ----------------
  function automatic logic [31:0] payload(input int src, input int seq, input int k);
    logic [31:0] x;
    x = 32'(src) * 32'h9E37_79B9 ^ 32'(seq) * 32'h85EB_CA6B ^ 32'(k) * 32'hC2B2_AE35;
    return x ^ (x >> 15);
  endfunction

  int  exp_len [N][MAXSEQ];
  int  exp_dst [N][MAXSEQ];
  int  sent    [N];
  int  mode = 0;          // 0: off, 1: uniform, 2: hotspot to rack 0
  int  gap_max = 0;

  int  g_seq [N], g_word [N], g_words [N], g_gap [N];
  bit  g_busy [N];

  function automatic frame_beat_t beat_of(input int s);
    frame_beat_t b;
    int q, k, len;
    q = g_seq[s]; k = g_word[s]; len = exp_len[s][q];
    b.sof = (k == 0);
    b.eof = (k == g_words[s] - 1);
    b.last_bytes = 2'(len % 4);
    case (k)
      0: b.data = 32'h0200_0000;
      1: b.data = {8'(exp_dst[s][q]), 8'd1, 16'h0200};
      2: b.data = {8'(s), 24'(q)};
      default: b.data = payload(s, q, k);
    endcase
    return b;
  endfunction

  always_comb for (int s = 0; s < N; s++) begin
    srv_in_valid[s] = g_busy[s];
    srv_in_beat[s]  = g_busy[s] ? beat_of(s) : '0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < N; s++) begin
      if (g_busy[s]) begin
        if (srv_in_ready[s]) begin
          if (g_word[s] == g_words[s] - 1) begin
            g_busy[s] <= 1'b0;
            g_gap[s]  <= (gap_max > 0) ? int'($urandom_range(0, gap_max)) : 0;
          end else g_word[s] <= g_word[s] + 1;
        end
      end else if (mode != 0 && g_gap[s] == 0 && sent[s] < MAXSEQ) begin
        int len, d;
        len = int'($urandom_range(MIN_FRAME_BYTES, MAX_FRAME_BYTES));
        d   = (mode == 2) ? 0 : int'($urandom_range(0, N - 1));
        if (mode == 2 && s == 0) d = 1 + int'($urandom_range(0, N - 2));
        if (mode == 1 && $urandom_range(0, 49) == 0) d = 7;   // no such rack
        exp_len[s][sent[s]] = len;
        exp_dst[s][sent[s]] = d;
        g_seq[s]   <= sent[s];
        g_words[s] <= (len + 3) / 4;
        g_word[s]  <= 0;
        g_busy[s]  <= 1'b1;
        sent[s]    <= sent[s] + 1;
      end else if (g_gap[s] > 0) g_gap[s] <= g_gap[s] - 1;
    end
  end

  // ---------------- checker at the server ports ----------------
  int  last_seq [N][N];   // [src][dst]
  int  recv     [N];      // frames delivered, by source
  int  c_src [N], c_seq [N], c_k [N];
  bit  c_ok [N];

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < N; d++) if (srv_out_valid[d]) begin
      frame_beat_t b;
      int k;
      b = srv_out_beat[d];
      k = b.sof ? 0 : c_k[d];
      if (b.sof) c_ok[d] = 1'b1;
      if (k == 1 && b.data[31:24] != 8'(d)) c_ok[d] = 1'b0;
      if (k == 2) begin
        c_src[d] = int'(b.data[31:24]);
        c_seq[d] = int'(b.data[23:0]);
        if (c_src[d] >= N || c_seq[d] >= MAXSEQ) c_ok[d] = 1'b0;
      end
      if (k > 2 && c_src[d] < N && b.data != payload(c_src[d], c_seq[d], k)) c_ok[d] = 1'b0;
      if (b.eof) begin
        int len, s, q;
        s = c_src[d]; q = c_seq[d];
        len = k * 4 + ((b.last_bytes == 0) ? 4 : int'(b.last_bytes));
        if (k < 2 || s >= N) c_ok[d] = 1'b0;
        else begin
          if (exp_len[s][q] != len || exp_dst[s][q] != d) c_ok[d] = 1'b0;
          if (q <= last_seq[s][d]) c_ok[d] = 1'b0;   // order, no duplicates
          last_seq[s][d] = q;
          recv[s]++;
        end
        check(c_ok[d], $sformatf("frame at rack %0d from %0d seq %0d", d, s, q));
      end
      c_k[d] = k + 1;
    end
  end

  // ---------------- empty-slot counter ----------------
  int empty_slots = 0;
  always @(posedge clk) if (rst_n && slot_phase == 10'(PKT_WORDS + 3) && n_arb > 0) begin
    bit any;
    any = 0;
    for (int i = 0; i < N; i++) any |= dut.u_ctrl.u_cc.req_v[i];
    if (!any) empty_slots++;
  end

  // ---------------- sequence ----------------
  task automatic wait_slots(input int n);
    repeat (n * SLOT_WORDS) @(posedge clk);
  endtask

  function automatic int total_occ();
    int t = 0;
    for (int i = 0; i < N; i++) for (int b = 0; b < NB; b++) t += int'(tor_occ_bytes[i][b]);
    return t;
  endfunction

  initial begin
    int sum_nack, sum_retx, sum_foreign, sum_drop, sum_intra, sum_crc, sum_unknown;
    for (int i = 0; i < N; i++) begin
      tor_prio[i] = 8'(i + 1);   // priority order 1 > 2 > 3 > 4
      sent[i] = 0; recv[i] = 0; g_busy[i] = 0; g_gap[i] = 0; g_seq[i] = 0;
      g_word[i] = 0; g_words[i] = 1; c_k[i] = 0; c_src[i] = 0; c_seq[i] = 0; c_ok[i] = 1;
      for (int j = 0; j < N; j++) last_seq[i][j] = -1;
    end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // time synchronisation
    wait_slots(8);
    for (int i = 0; i < N; i++) begin
      check(tor_synced[i], $sformatf("ToR %0d synchronised", i));
      check(tor_link_delay[i] == 16'(BASE_DELAY + i * DELAY_STEP),
            $sformatf("ToR %0d delay %0d", i, tor_link_delay[i]));
    end

    check(tor_local_time[0] == ctrl_time, "ToR 0 time equals controller time");
    check(tor_local_time[1] == ctrl_time, "ToR 1 time equals controller time");
    check(tor_local_time[2] == ctrl_time, "ToR 2 time equals controller time");
    check(tor_local_time[3] == ctrl_time, "ToR 3 time equals controller time");

    // phase 1: uniform random traffic
    mode = 1; gap_max = 900;
    wait_slots(60);
    // phase 2: hotspot
    mode = 2; gap_max = 0;
    wait_slots(30);
    // phase 3: drain
    mode = 0;
    for (int t = 0; t < 400 && total_occ() != 0; t++) wait_slots(1);
    wait_slots(4);

    check(total_occ() == 0, "all buffer blocks drained");
    sum_nack = 0; sum_retx = 0; sum_foreign = 0; sum_drop = 0; sum_intra = 0; sum_crc = 0; sum_unknown = 0;
    for (int s = 0; s < N; s++) begin
      check(sent[s] == recv[s] + int'(tor_n_drop[s]) + int'(tor_n_unknown[s]),
            $sformatf("ToR %0d: sent %0d = delivered %0d + dropped %0d + unknown %0d",
                      s, sent[s], recv[s], tor_n_drop[s], tor_n_unknown[s]));
      check(tor_n_release[s] == tor_n_ack[s], $sformatf("ToR %0d every ACK releases a packet", s));
      check(tor_n_rx_overflow[s] == 0, $sformatf("ToR %0d no received packet lost", s));
      check(tor_n_rx_align[s] == tor_n_rx_ok[s] + tor_n_rx_foreign[s] + tor_n_rx_crc_err[s],
            $sformatf("ToR %0d every arriving packet found its bit phase", s));
      sum_unknown += int'(tor_n_unknown[s]);
      check(tor_n_ack[s] + tor_n_nack[s] == tor_n_req[s], $sformatf("ToR %0d every request answered", s));
      sum_nack += int'(tor_n_nack[s]); sum_retx += int'(tor_n_retx[s]);
      sum_foreign += int'(tor_n_rx_foreign[s]); sum_drop += int'(tor_n_drop[s]);
      sum_intra += int'(tor_n_intra[s]); sum_crc += int'(tor_n_rx_crc_err[s]);
    end
    check(sum_nack == int'(n_nack_ctrl), "ToR NACKs equal controller NACKs");
    check(sum_crc == 0, "no CRC errors");
    $display("mechanisms: contention=%0d nack=%0d retx=%0d filler=%0d reconfig=%0d intra=%0d overflow_drop=%0d empty_slots=%0d unknown=%0d",
             n_contention, sum_nack, sum_retx, sum_foreign, n_reconfig, sum_intra, sum_drop, empty_slots, sum_unknown);
    for (int s = 0; s < N; s++) $display("ToR %0d: sent %0d delivered %0d dropped %0d req %0d ack %0d",
                                         s, sent[s], recv[s], tor_n_drop[s], tor_n_req[s], tor_n_ack[s]);
    check(n_contention > 0, "contention happened");
    check(sum_nack > 0, "NACK happened");
    check(sum_retx > 0, "retransmission happened");
    check(sum_foreign > 0, "packet forwarded to a rack with no request");
    check(n_reconfig > 0, "gates reconfigured");
    check(sum_intra > 0, "intra-rack forwarding happened");
    check(sum_drop > 0, "buffer overflow happened");
    check(empty_slots > 0, "slot without requests happened");
    check(sum_unknown > 0, "frames for an unknown rack dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (700 * SLOT_WORDS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
