// ossc_cluster: one cluster of the optical data centre network with the
// synergistic switch control - N ToR switches, one N x N SOA optical switch
// and its FPGA-based switch controller, joined by one bidirectional label
// channel and one data channel (up and down) per ToR.
//
// The controller's clock drives everything: the label channels are
// continuous, so each ToR recovers the same clock frequency from them, and
// here a single clk stands for it. The label channel of ToR i carries, in
// the controller's direction, timestamps and label requests and, back,
// timestamp echoes, time and label responses (ACK/NACK). The data channels
// carry fixed 650-word packets separated by 14-word gaps of "1010..."; the
// controller sets the SOA gates in each gap. Fibres are modelled as fixed
// delays: the link of ToR i is BASE_DELAY + i*DELAY_STEP cycles long, the
// same for its label and data fibres, up and down; in addition the data
// uplink of ToR i is (i*BIT_STEP mod 32) bit times longer, so packets from
// different ToRs reach a receiver with different bit phases. ToR i has priority
// tor_prio[i] (lower number wins); ToR numbers here start at 0.
module ossc_cluster
  import ossc_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter int unsigned BLOCK_WORDS = 2048,
  parameter int unsigned RXB_DEPTH   = 2048,
  parameter int unsigned PKT_W       = PKT_WORDS,
  parameter int unsigned SLOT_W      = SLOT_WORDS,
  parameter int unsigned BASE_DELAY  = 5,
  parameter int unsigned DELAY_STEP  = 3,
  parameter int unsigned BIT_STEP    = 7,
  localparam int unsigned NB         = N - 1,
  localparam int unsigned PH_W       = $clog2(SLOT_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        tor_prio      [N],
  // servers of each rack
  input  logic              srv_in_valid  [N],
  input  frame_beat_t       srv_in_beat   [N],
  output logic              srv_in_ready  [N],
  output logic              srv_out_valid [N],
  output frame_beat_t       srv_out_beat  [N],
  // status
  output logic              tor_synced    [N],
  output logic [15:0]       tor_link_delay[N],
  output logic [31:0]       tor_occ_bytes [N][NB],
  output logic [31:0]       tor_n_req     [N],
  output logic [31:0]       tor_n_ack     [N],
  output logic [31:0]       tor_n_nack    [N],
  output logic [31:0]       tor_n_retx    [N],
  output logic [31:0]       tor_n_drop    [N],
  output logic [31:0]       tor_n_pkt_tx  [N],
  output logic [31:0]       tor_n_rx_ok   [N],
  output logic [31:0]       tor_n_rx_foreign [N],
  output logic [31:0]       tor_n_rx_crc_err [N],
  output logic [31:0]       tor_n_intra   [N],
  output logic [31:0]       tor_n_inter   [N],
  output logic [31:0]       tor_n_unknown [N],
  output logic [31:0]       tor_n_release [N],
  output logic [31:0]       tor_n_rx_overflow [N],
  output logic [31:0]       tor_n_rx_align [N],
  output logic [TIME_W-1:0] tor_local_time[N],
  output logic [TIME_W-1:0] ctrl_time,
  output logic [PH_W-1:0]   slot_phase,
  output logic              soa_gate      [N][N],
  output logic [31:0]       n_arb,
  output logic [31:0]       n_contention,
  output logic [31:0]       n_nack_ctrl,
  output logic [31:0]       n_reconfig
);

  logic [31:0] lbl_up_tor  [N], lbl_up_ctrl [N];   // ToR -> controller
  logic [31:0] lbl_dn_ctrl [N], lbl_dn_tor  [N];   // controller -> ToR
  logic [31:0] dat_up_tor  [N], dat_up_sw   [N];   // ToR -> switch
  logic [31:0] dat_dn_sw   [N], dat_dn_tor  [N];   // switch -> ToR

  for (genvar i = 0; i < N; i++) begin : g_rack
    localparam int unsigned D = BASE_DELAY + i * DELAY_STEP;

    tor_switch #(
      .N(N), .ID(i), .BLOCK_WORDS(BLOCK_WORDS), .RXB_DEPTH(RXB_DEPTH),
      .PKT_W(PKT_W), .SLOT_W(SLOT_W)
    ) u_tor (
      .clk, .rst_n,
      .prio          (tor_prio[i]),
      .srv_in_valid  (srv_in_valid[i]),
      .srv_in_beat   (srv_in_beat[i]),
      .srv_in_ready  (srv_in_ready[i]),
      .srv_out_valid (srv_out_valid[i]),
      .srv_out_beat  (srv_out_beat[i]),
      .label_tx_word (lbl_up_tor[i]),
      .label_rx_word (lbl_dn_tor[i]),
      .data_tx_word  (dat_up_tor[i]),
      .data_rx_word  (dat_dn_tor[i]),
      .synced        (tor_synced[i]),
      .link_delay    (tor_link_delay[i]),
      .occ_bytes     (tor_occ_bytes[i]),
      .n_req         (tor_n_req[i]),
      .n_ack         (tor_n_ack[i]),
      .n_nack        (tor_n_nack[i]),
      .n_retx        (tor_n_retx[i]),
      .n_drop        (tor_n_drop[i]),
      .n_pkt_tx      (tor_n_pkt_tx[i]),
      .n_rx_ok       (tor_n_rx_ok[i]),
      .n_rx_foreign  (tor_n_rx_foreign[i]),
      .n_rx_crc_err  (tor_n_rx_crc_err[i]),
      .n_intra       (tor_n_intra[i]),
      .n_inter       (tor_n_inter[i]),
      .n_unknown     (tor_n_unknown[i]),
      .n_release     (tor_n_release[i]),
      .n_rx_overflow (tor_n_rx_overflow[i]),
      .n_rx_align    (tor_n_rx_align[i]),
      .local_time    (tor_local_time[i])
    );

    fiber_link #(.DELAY(D)) u_lbl_up (.clk, .rst_n, .in_word (lbl_up_tor[i]),  .out_word (lbl_up_ctrl[i]));
    fiber_link #(.DELAY(D)) u_lbl_dn (.clk, .rst_n, .in_word (lbl_dn_ctrl[i]), .out_word (lbl_dn_tor[i]));
    fiber_link #(.DELAY(D), .BIT_DELAY((i * BIT_STEP) % 32)) u_dat_up (.clk, .rst_n, .in_word (dat_up_tor[i]),  .out_word (dat_up_sw[i]));
    fiber_link #(.DELAY(D)) u_dat_dn (.clk, .rst_n, .in_word (dat_dn_sw[i]),   .out_word (dat_dn_tor[i]));
  end

  switch_controller #(.N(N), .PKT_W(PKT_W), .SLOT_W(SLOT_W)) u_ctrl (
    .clk, .rst_n,
    .label_rx_word (lbl_up_ctrl),
    .label_tx_word (lbl_dn_ctrl),
    .gate          (soa_gate),
    .ctrl_time, .slot_phase,
    .n_arb, .n_contention,
    .n_nack        (n_nack_ctrl),
    .n_reconfig
  );

  soa_switch #(.N(N)) u_soa (
    .in_word  (dat_up_sw),
    .gate     (soa_gate),
    .out_word (dat_dn_sw)
  );

endmodule
