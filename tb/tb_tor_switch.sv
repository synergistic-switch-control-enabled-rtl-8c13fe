// tb_tor_switch: one ToR switch (rack 0 of a 2-rack cluster) working with a
// real switch controller and SOA switch across a 9-cycle fibre. The testbench
// plays rack 1: at slot phase 650 it may send a label request for rack 0
// (and then a data packet for rack 0 in the next slot) or for rack 1 with a
// better priority than the ToR, so that the ToR loses and gets a NACK.
// The servers of rack 0 send frames to rack 1, to rack 0 and to a rack that
// does not exist. Checks: time synchronisation and the measured delay; each
// ToR packet reaches the switch with its first word exactly at slot phase 0
// and a correct CRC; inter-rack frames arrive at rack 1 whole, in order and
// once (so NACKed frames were sent again); frames for rack 0 from the servers
// and from rack 1 reach the servers whole and in order; counters.
module tb_tor_switch;
  import ossc_pkg::*;
  localparam int N = 2, D = 9;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  // ToR
  logic        srv_in_valid, srv_in_ready, srv_out_valid, synced;
  frame_beat_t srv_in_beat, srv_out_beat;
  logic [31:0] label_tx_word, label_rx_word, data_tx_word, data_rx_word;
  logic [15:0] link_delay;
  logic [31:0] occ_bytes [1];
  logic [31:0] n_req, n_ack, n_nack, n_retx, n_drop, n_pkt_tx, n_rx_ok, n_rx_foreign,
               n_rx_crc_err, n_intra, n_inter, n_unknown, n_release, n_rx_overflow;
  logic [TIME_W-1:0] local_time;
  tor_switch #(.N(N), .ID(0)) dut (
    .clk, .rst_n, .prio (8'd5),
    .srv_in_valid, .srv_in_beat, .srv_in_ready, .srv_out_valid, .srv_out_beat,
    .label_tx_word, .label_rx_word, .data_tx_word, .data_rx_word,
    .synced, .link_delay, .occ_bytes, .n_req, .n_ack, .n_nack, .n_retx, .n_drop,
    .n_pkt_tx, .n_rx_ok, .n_rx_foreign, .n_rx_crc_err, .n_intra, .n_inter,
    .n_unknown, .n_release, .n_rx_overflow, .local_time
  );

  // fibres, controller, switch
  logic [31:0] c_lbl_rx [N], c_lbl_tx [N], sw_in [N], sw_out [N];
  logic        gate [N][N];
  logic [TIME_W-1:0] ctrl_time;
  logic [9:0]  slot_phase;
  logic [31:0] n_arb, n_contention, c_nack, n_reconfig;
  logic [31:0] tb_lbl, tb_data;
  fiber_link #(.DELAY(D)) f0 (.clk, .rst_n, .in_word (label_tx_word), .out_word (c_lbl_rx[0]));
  fiber_link #(.DELAY(D)) f1 (.clk, .rst_n, .in_word (c_lbl_tx[0]),   .out_word (label_rx_word));
  fiber_link #(.DELAY(D)) f2 (.clk, .rst_n, .in_word (data_tx_word),  .out_word (sw_in[0]));
  fiber_link #(.DELAY(D)) f3 (.clk, .rst_n, .in_word (sw_out[0]),     .out_word (data_rx_word));
  assign c_lbl_rx[1] = tb_lbl;
  assign sw_in[1]    = tb_data;
  switch_controller #(.N(N)) u_ctrl (
    .clk, .rst_n, .label_rx_word (c_lbl_rx), .label_tx_word (c_lbl_tx), .gate,
    .ctrl_time, .slot_phase, .n_arb, .n_contention, .n_nack (c_nack), .n_reconfig
  );
  soa_switch #(.N(N)) u_soa (.in_word (sw_in), .gate, .out_word (sw_out));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [31:0] crc_ref(input logic [31:0] words [$]);
    logic [31:0] r;
    r = CRC_INIT;
    foreach (words[n]) r = crc32_word(r, words[n]);
    return ~r;
  endfunction

  // ---------------- servers of rack 0 ----------------
  frame_beat_t in_beats [$], exp_inter [$], exp_out [$];
  bit exp_src [$];   // source of each exp_out beat: 1 rack 1, 0 own servers
  int e_intra = 0, e_inter = 0, e_unknown = 0, in_i = 0, gap = 0, tag = 0;
  bit traffic = 0;
  task automatic add_frame(input int rack, input bit from_rack1, output frame_beat_t f [$]);
    int len, nw;
    f = {};
    len = int'($urandom_range(MIN_FRAME_BYTES, 600)); nw = (len + 3) / 4;
    for (int k = 0; k < nw; k++) begin
      frame_beat_t b;
      b.data = (k == 1) ? {8'(rack), 8'd3, 16'(tag)} : {from_rack1, 31'(tag * 1000 + k)};
      b.sof = (k == 0); b.eof = (k == nw - 1); b.last_bytes = 2'(len % 4);
      f.push_back(b);
    end
    tag++;
  endtask
  assign srv_in_valid = traffic && gap == 0 && in_i < in_beats.size();
  assign srv_in_beat  = srv_in_valid ? in_beats[in_i] : '0;
  always_ff @(posedge clk) if (rst_n) begin
    if (srv_in_valid && srv_in_ready) begin
      in_i <= in_i + 1;
      if (in_beats[in_i].eof) gap <= int'($urandom_range(0, 300));
    end else if (gap > 0) gap <= gap - 1;
  end

  // ---------------- rack 1 played by the testbench ----------------
  int want = 0, cur = 0;          // 0 none, 1 request rack 0 (+ packet), 2 request rack 1 (contend)
  logic [31:0] pkt1 [PKT_WORDS];
  int n_tb_pkts = 0, n_contend = 0;
  assign tb_lbl  = (slot_phase == 10'(PKT_WORDS) && want != 0)
                   ? label_encode(make_req((want == 1) ? 8'd0 : 8'd1, 8'd0)) : IDLE_WORD;
  assign tb_data = (cur == 1 && slot_phase < 10'(PKT_WORDS)) ? pkt1[slot_phase] : IDLE_WORD;
  always @(posedge clk) if (rst_n) begin
    if (slot_phase == 10'(PKT_WORDS - 1)) begin
      int r; r = int'($urandom_range(0, 5));
      want <= traffic ? (r == 0 ? 1 : (r == 1 ? 2 : 0)) : 0;
    end
    if (slot_phase == 10'(SLOT_WORDS - 1)) begin
      cur <= want;
      if (want == 2) n_contend++;
      if (want == 1) begin
        logic [31:0] pk [$], cw [$];
        frame_beat_t f [$];
        n_tb_pkts++;
        pk = {}; cw = {};
        pk.push_back(PRE_SPD_WORD);
        pk.push_back({16'd1, 16'd0});
        for (int fr = 0; fr < 2; fr++) begin
          add_frame(0, 1, f);
          pk.push_back(frame_header(16'(f.size() * 4 - ((f[f.size()-1].last_bytes == 0) ? 0 : 4 - int'(f[f.size()-1].last_bytes)))));
          foreach (f[k]) begin pk.push_back(f[k].data); exp_out.push_back(f[k]); exp_src.push_back(1'b1); end
        end
        while (pk.size() < PKT_WORDS - 1) pk.push_back(IDLE_WORD);
        for (int i = 1; i < PKT_WORDS - 1; i++) cw.push_back(pk[i]);
        pk.push_back(crc_ref(cw));
        foreach (pk[i]) pkt1[i] = pk[i];
      end
    end
  end

  // ---------------- monitor at switch output 1 (packets from the ToR) ----------------
  logic [31:0] cap [$];
  int n_tor_pkts = 0;
  bit in_cap = 0;
  always @(posedge clk) if (rst_n) begin
    if (!in_cap && sw_out[1] == PRE_SPD_WORD && !(cur == 1 && gate[1][1])) begin
      check(slot_phase == 10'd0, "ToR packet starts at slot phase 0");
      in_cap = 1; cap = {};
    end
    if (in_cap) begin
      check(sw_out[1] == sw_in[0], "switch passes the ToR packet unchanged");
      cap.push_back(sw_out[1]);
      if (cap.size() == PKT_WORDS) begin
        logic [31:0] cw [$];
        int w;
        in_cap = 0; n_tor_pkts++;
        cw = {};
        for (int i = 1; i < PKT_WORDS - 1; i++) cw.push_back(cap[i]);
        check(cap[PKT_WORDS-1] == crc_ref(cw), "ToR packet CRC");
        check(cap[1] == {16'd0, 16'd1}, "ToR packet address src 0 dst 1");
        w = 2;
        while (w < PKT_WORDS - 1 && cap[w][31:16] == 16'd0 && cap[w] != 0) begin
          int len, nw;
          len = int'(cap[w][15:0]); nw = (len + 3) / 4; w++;
          for (int k = 0; k < nw; k++) begin
            check(exp_inter.size() > 0 && cap[w + k] == exp_inter[0].data, "inter-rack frame word in order");
            if (exp_inter.size() > 0) void'(exp_inter.pop_front());
          end
          w += nw;
        end
      end
    end
  end

  // CRC of every packet at the ToR output, including those that lose contention
  int tw = -1; logic [31:0] tcrc;
  always @(posedge clk) if (rst_n) begin
    if (tw < 0 && data_tx_word == PRE_SPD_WORD) begin tw = 0; tcrc = CRC_INIT; end
    else if (tw >= 0) begin
      tw++;
      if (tw < PKT_WORDS - 1) tcrc = crc32_word(tcrc, data_tx_word);
      else begin
        check(data_tx_word == ~tcrc, "CRC word at the ToR output");
        tw = -1;
      end
    end
  end
  // ---------------- monitor at the servers of rack 0 ----------------
  // frames from rack 1 and intra-rack frames are each in order; word 0 tells the source
  bit out_src = 0;
  always @(posedge clk) if (rst_n && srv_out_valid) begin
    int idx;
    bit src;
    src = srv_out_beat.sof ? srv_out_beat.data[31] : out_src;
    out_src = src;
    idx = -1;
    foreach (exp_out[i]) if (exp_src[i] == src) begin idx = i; break; end
    check(idx >= 0 && exp_out[idx] == srv_out_beat, "server output beat");
    if (idx >= 0) begin exp_out.delete(idx); exp_src.delete(idx); end
  end

  initial begin
    frame_beat_t f [$];
    for (int t = 0; t < 300; t++) begin
      int r, rack;
      r = int'($urandom_range(0, 9));
      rack = (r < 6) ? 1 : (r < 9 ? 0 : 5);
      add_frame(rack, 0, f);
      foreach (f[k]) begin
        in_beats.push_back(f[k]);
        if (rack == 1) exp_inter.push_back(f[k]);
        if (rack == 0) begin exp_out.push_back(f[k]); exp_src.push_back(1'b0); end
      end
      if (rack == 0) e_intra++; else if (rack == 1) e_inter++; else e_unknown++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (8 * SLOT_WORDS) @(posedge clk);
    check(synced, "synchronised");
    check(link_delay == 16'(D), "measured fibre delay");
    check(local_time == ctrl_time, "local time equals controller time");
    traffic = 1;
    wait (in_i == in_beats.size());
    for (int s = 0; s < 200 && (occ_bytes[0] != 0 || exp_inter.size() != 0); s++) repeat (SLOT_WORDS) @(posedge clk);
    traffic = 0;
    repeat (4 * SLOT_WORDS) @(posedge clk);
    check(exp_inter.size() == 0, "all inter-rack frames delivered");
    check(exp_out.size() == 0, "all frames for rack 0 delivered");
    check(n_intra == 32'(e_intra) && n_inter == 32'(e_inter) && n_unknown == 32'(e_unknown), "switch counters");
    check(n_drop == 0 && n_rx_overflow == 0 && n_rx_crc_err == 0, "no loss");
    check(n_nack > 0 && n_retx == n_nack, "NACKs answered by retransmission");
    check(n_nack == c_nack, "ToR and controller NACK counts agree");
    check(n_release == n_ack && n_ack + n_nack == n_req, "every request answered");
    check(n_rx_ok == 32'(n_tb_pkts), "packets from rack 1 received");
    check(n_rx_foreign > 0, "lost packets come back as foreign and are dropped");
    check(n_tor_pkts == int'(n_ack), "one packet at rack 1 per ACK");
    $display("req=%0d ack=%0d nack=%0d pkts_at_rack1=%0d tb_pkts=%0d contend=%0d foreign=%0d",
             n_req, n_ack, n_nack, n_tor_pkts, n_tb_pkts, n_contend, n_rx_foreign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (600 * SLOT_WORDS) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
