// tb_ossc_workloads: the operating cases of the four-rack cluster, run on
// ossc_cluster at its default parameters.
//
// 1. Contention and flow control. Racks 0 and 1 (priorities 1 and 2) both
//    hold frames for rack 2 when the same slot decision is taken; rack 0 also
//    holds a smaller amount for rack 1. Expected, slot by slot, at the
//    controller: both request rack 2; rack 0 gets ACK and rack 1 NACK (its
//    packet goes to another rack and is dropped there); in the next slot
//    rack 0 makes a new request (rack 1) while rack 1 repeats its request for
//    rack 2, until it is acknowledged. All frames must arrive.
// 2. Full load without contention (rack i sends to rack i+1 mod 4) for 30
//    slots: every rack must be acknowledged in every slot, every switch
//    output must carry a packet in every slot, and the share of line time
//    that carries packets is measured: 650 of 664 cycles; with the one cycle
//    that the receiver needs for preamble and delimiter this is
//    (650 - 1) / 664 = 97.7 %.
// Throughout: the label response is on the line 4 cycles (12.4 ns) after the
// request at the controller; the gates change only at slot phase 658,
// inside the 14-cycle gap; each receiver raises its packet-start pulse one
// cycle after the word holding preamble and delimiter. The data uplinks
// have different sub-word (bit) delays, so receivers see packets at
// different bit phases; packets are counted after the bit-phase aligner.
module tb_ossc_workloads;
  import ossc_pkg::*;
  localparam int N = 4, NB = N - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic [7:0]        tor_prio [N];
  logic              srv_in_valid [N], srv_in_ready [N], srv_out_valid [N];
  frame_beat_t       srv_in_beat [N], srv_out_beat [N];
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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- server frame sources ----------------
  frame_beat_t q0 [$], q1 [$], q2 [$], q3 [$];
  int frames_to [N];
  function automatic frame_beat_t head(input int s);
    case (s) 0: return q0[0]; 1: return q1[0]; 2: return q2[0]; default: return q3[0]; endcase
  endfunction
  function automatic int qsize(input int s);
    case (s) 0: return q0.size(); 1: return q1.size(); 2: return q2.size(); default: return q3.size(); endcase
  endfunction
  task automatic add_frame(input int s, input int dst, input int len);
    int nw;
    nw = (len + 3) / 4;
    for (int k = 0; k < nw; k++) begin
      frame_beat_t b;
      b.data = (k == 1) ? {8'(dst), 8'd1, 16'h0200} : {8'(s), 8'(dst), 16'(k)};
      b.sof = (k == 0); b.eof = (k == nw - 1); b.last_bytes = 2'(len % 4);
      case (s) 0: q0.push_back(b); 1: q1.push_back(b); 2: q2.push_back(b); default: q3.push_back(b); endcase
    end
    frames_to[dst]++;
  endtask
  always_comb for (int s = 0; s < N; s++) begin
    srv_in_valid[s] = qsize(s) > 0;
    srv_in_beat[s]  = (qsize(s) > 0) ? head(s) : '0;
  end
  always_ff @(posedge clk) begin
    if (srv_in_valid[0] && srv_in_ready[0]) void'(q0.pop_front());
    if (srv_in_valid[1] && srv_in_ready[1]) void'(q1.pop_front());
    if (srv_in_valid[2] && srv_in_ready[2]) void'(q2.pop_front());
    if (srv_in_valid[3] && srv_in_ready[3]) void'(q3.pop_front());
  end
  int frames_at [N];
  always_ff @(posedge clk) if (rst_n)
    for (int d = 0; d < N; d++) if (srv_out_valid[d] && srv_out_beat[d].eof) frames_at[d] <= frames_at[d] + 1;

  // ---------------- label monitor at the controller ----------------
  int req_dest [N][$];   // per slot: requested rack, -1 none
  int rsp_port [N][$];
  int lat_ok = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      label_msg_t m;
      m = label_decode(dut.lbl_up_ctrl[i]);
      if (slot_phase == 10'(PKT_WORDS)) req_dest[i].push_back((m.valid && m.ltype == LT_REQ) ? int'(m.payload[15:8]) : -1);
      else if (m.valid && m.ltype == LT_REQ) check(0, "request off the slot grid");
      m = label_decode(dut.lbl_dn_ctrl[i]);
      if (m.valid && m.ltype == LT_RSP) begin
        check(slot_phase == 10'(PKT_WORDS + 4), "response 4 cycles after the request");
        lat_ok++;
        rsp_port[i].push_back(int'(m.payload[7:0]));
      end else if (slot_phase == 10'(PKT_WORDS + 4)) rsp_port[i].push_back(-1);
    end
  end

  // ---------------- gates and receivers ----------------
  logic gate_q [N][N];
  int gate_changes = 0;
  always @(posedge clk) if (rst_n) begin
    bit ch; ch = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (soa_gate[i][j] != gate_q[i][j]) ch = 1;
    if (ch) begin gate_changes++; check(slot_phase == 10'(PKT_WORDS + 8), "gates change only at phase 658"); end
    gate_q <= soa_gate;
  end
  // aligned words at each receiver
  logic [31:0] al [N];
  assign al[0] = dut.g_rack[0].u_tor.u_align.out_word;
  assign al[1] = dut.g_rack[1].u_tor.u_align.out_word;
  assign al[2] = dut.g_rack[2].u_tor.u_align.out_word;
  assign al[3] = dut.g_rack[3].u_tor.u_align.out_word;
  int skewed = 0;
  logic spd_q [N];
  int n_start = 0;
  always @(posedge clk) if (rst_n) begin
    logic st [N];
    st[0] = dut.g_rack[0].u_tor.u_prx.pkt_start; st[1] = dut.g_rack[1].u_tor.u_prx.pkt_start;
    st[2] = dut.g_rack[2].u_tor.u_prx.pkt_start; st[3] = dut.g_rack[3].u_tor.u_prx.pkt_start;
    if (dut.g_rack[0].u_tor.u_align.locked && dut.g_rack[0].u_tor.u_align.offset != 0) skewed++;
    for (int i = 0; i < N; i++) begin
      if (st[i]) begin n_start++; check(spd_q[i], "packet start one cycle after the delimiter word"); end
      spd_q[i] <= (al[i] == PRE_SPD_WORD);
    end
  end
  // line occupancy at the switch outputs
  int pkt_left [N];
  longint busy_cycles = 0, all_cycles = 0;
  bit measure = 0;
  int pkts_seen [N];
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) begin
      bit busy;
      if (pkt_left[j] == 0 && al[j] == PRE_SPD_WORD) pkt_left[j] = PKT_WORDS;
      busy = pkt_left[j] > 0;
      if (pkt_left[j] > 0) begin
        if (pkt_left[j] == PKT_WORDS && measure) pkts_seen[j]++;
        pkt_left[j]--;
      end
      if (measure) begin all_cycles++; if (busy) busy_cycles++; end
    end
  end

  task automatic wait_phase(input int p);
    do @(posedge clk); while (slot_phase != 10'(p));
  endtask

  initial begin
    int base, s0, a0, a1;
    real util;
    for (int i = 0; i < N; i++) begin
      tor_prio[i] = 8'(i + 1); frames_to[i] = 0; frames_at[i] = 0; spd_q[i] = 0; pkt_left[i] = 0; pkts_seen[i] = 0;
      for (int j = 0; j < N; j++) gate_q[i][j] = 0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (8 * SLOT_WORDS) @(posedge clk);
    for (int i = 0; i < N; i++) check(tor_synced[i], "synchronised");

    // ---- case 1: contention, ACK/NACK, retransmission ----
    wait_phase(10);
    base = req_dest[0].size();         // index of the slot whose requests come next
    add_frame(0, 2, 1000); add_frame(0, 2, 1000);
    add_frame(1, 2, 1000); add_frame(1, 2, 1000);
    add_frame(0, 1, 600);
    repeat (8 * SLOT_WORDS) @(posedge clk);
    s0 = -1;
    for (int k = base; k < req_dest[0].size() && k < req_dest[1].size(); k++)
      if (req_dest[0][k] == 2 && req_dest[1][k] == 2) begin s0 = k; break; end
    check(s0 >= 0, "both racks request rack 2 in the same slot");
    if (s0 >= 0) begin
      check(rsp_port[0][s0] == 2, "slot N: higher priority rack 0 gets ACK");
      check(rsp_port[1][s0] != 2 && rsp_port[1][s0] >= 0, "slot N: rack 1 gets NACK");
      check(req_dest[0][s0 + 1] == 1, "slot N+1: rack 0 sends a new request (rack 1)");
      check(req_dest[1][s0 + 1] == 2, "slot N+1: rack 1 resends its request for rack 2");
      check(rsp_port[1][s0 + 1] == 2, "slot N+1: rack 1 now gets ACK");
      check(rsp_port[0][s0 + 1] == 1, "slot N+1: rack 0 gets ACK");
      $display("slot N:   req %0d %0d  rsp %0d %0d", req_dest[0][s0], req_dest[1][s0], rsp_port[0][s0], rsp_port[1][s0]);
      $display("slot N+1: req %0d %0d  rsp %0d %0d", req_dest[0][s0+1], req_dest[1][s0+1], rsp_port[0][s0+1], rsp_port[1][s0+1]);
    end
    check(frames_at[2] == 4 && frames_at[1] == 1, "all frames of case 1 delivered");
    check(tor_n_rx_foreign[0] + tor_n_rx_foreign[1] + tor_n_rx_foreign[2] + tor_n_rx_foreign[3] >= 1,
          "the NACKed packet reached another rack and was dropped there");

    // ---- case 2: full load, no contention ----
    for (int i = 0; i < N; i++) begin
      frames_to[i] = 0; frames_at[i] = 0;
    end
    for (int f = 0; f < 60; f++) for (int s = 0; s < N; s++) add_frame(s, (s + 1) % N, 1500);
    repeat (6 * SLOT_WORDS) @(posedge clk);   // let the buffers fill
    wait_phase(0);
    a0 = int'(tor_n_ack[0]); a1 = int'(tor_n_nack[0] + tor_n_nack[1] + tor_n_nack[2] + tor_n_nack[3]);
    measure = 1;
    repeat (30 * SLOT_WORDS) @(posedge clk);
    measure = 0;
    check(int'(tor_n_ack[0]) - a0 == 30, "rack 0 acknowledged in every slot");
    check(int'(tor_n_nack[0] + tor_n_nack[1] + tor_n_nack[2] + tor_n_nack[3]) == a1, "no NACK without contention");
    for (int j = 0; j < N; j++) check(pkts_seen[j] == 30, $sformatf("output %0d carried a packet in every slot", j));
    util = real'(busy_cycles) / real'(all_cycles);
    check(busy_cycles * 664 == all_cycles * 650, "line occupancy 650 of 664 cycles");
    $display("line occupancy %0.4f, with one cycle for delimiter recovery %0.4f (expected 0.977)", util,
             real'(busy_cycles - 4 * 30) / real'(all_cycles));
    check((busy_cycles - 4 * 30) * 1000 / all_cycles == 977, "utilisation 97.7 percent");
    check(lat_ok > 0 && gate_changes > 0 && n_start > 0, "latency, gate and receiver checks ran");
    check(skewed > 0, "packets with a bit phase other than zero were received");
    $display("responses %0d, gate changes %0d, packet starts %0d", lat_ok, gate_changes, n_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (80 * SLOT_WORDS) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
