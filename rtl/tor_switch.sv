// tor_switch: one FPGA-based top-of-rack (ToR) switch of the cluster.
//
// Server frames enter the Ethernet switch: intra-rack frames go back to the
// servers, inter-rack frames into the buffer block of their destination
// rack. Once time is synchronised to the controller, every slot the buffer
// controller picks a block (the most occupied, or the refused one again),
// the label processor sends its label request on the label channel and the
// data packet aggregator sends a packet of that block's frames on the data
// channel, both launched early by the measured fibre delay so that they
// reach the controller and the switch on the slot grid. The label response
// (ACK/NACK) decides whether the frames are released or sent again. Packets
// arriving on the data channel are brought to the word boundary (each
// packet can arrive with its own bit phase), checked and unpacked into the RX block
// and passed to the servers. The time and latency management center
// measures the fibre delay and sets the local time at start-up.
// The transceivers and the CDR that recovers the controller's clock from the
// label channel are outside this logic: clk is that recovered clock.
module tor_switch
  import ossc_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter int unsigned ID          = 0,
  parameter int unsigned BLOCK_WORDS = 2048,
  parameter int unsigned RXB_DEPTH   = 2048,
  parameter int unsigned PKT_W       = PKT_WORDS,
  parameter int unsigned SLOT_W      = SLOT_WORDS,
  localparam int unsigned NB         = N - 1,
  localparam int unsigned BLK_W      = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned PH_W       = $clog2(SLOT_W)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  prio,          // forwarding priority (lower number wins)
  // servers
  input  logic        srv_in_valid,
  input  frame_beat_t srv_in_beat,
  output logic        srv_in_ready,
  output logic        srv_out_valid,
  output frame_beat_t srv_out_beat,
  // label channel (bidirectional, to the switch controller)
  output logic [31:0] label_tx_word,
  input  logic [31:0] label_rx_word,
  // data channel (to and from the optical switch)
  output logic [31:0] data_tx_word,
  input  logic [31:0] data_rx_word,
  // status
  output logic        synced,
  output logic [15:0] link_delay,
  output logic [31:0] occ_bytes [NB],
  output logic [31:0] n_req,
  output logic [31:0] n_ack,
  output logic [31:0] n_nack,
  output logic [31:0] n_retx,
  output logic [31:0] n_drop,
  output logic [31:0] n_pkt_tx,
  output logic [31:0] n_rx_ok,
  output logic [31:0] n_rx_foreign,
  output logic [31:0] n_rx_crc_err,
  output logic [31:0] n_intra,
  output logic [31:0] n_inter,
  output logic [31:0] n_unknown,     // server frames for a rack that does not exist
  output logic [31:0] n_release,     // packets acknowledged and freed
  output logic [31:0] n_rx_overflow, // received packets lost for lack of room
  output logic [31:0] n_rx_align,    // packets whose bit phase was found
  output logic [TIME_W-1:0] local_time
);

  // label channel
  label_msg_t lbl_tx, lbl_rx, lp_msg, tm_msg;
  label_codec u_label_codec (
    .clk, .rst_n,
    .tx_msg (lbl_tx), .tx_word (label_tx_word),
    .rx_word (label_rx_word), .rx_msg (lbl_rx)
  );
  assign lbl_tx = lp_msg.valid ? lp_msg : tm_msg;

  // time and latency management
  logic [PH_W-1:0]   tx_phase;
  time_latency_mgmt #(.SLOT_W(SLOT_W)) u_time (
    .clk, .rst_n,
    .rx_msg (lbl_rx), .tx_msg (tm_msg),
    .synced, .link_delay, .local_time, .tx_phase
  );

  // Ethernet switch
  logic             buf_valid;
  frame_beat_t      buf_beat;
  logic [BLK_W-1:0] buf_blk;
  logic             rxb_valid, rxb_ready;
  frame_beat_t      rxb_beat;
  ethernet_switch #(.N(N), .ID(ID)) u_eth (
    .clk, .rst_n,
    .in_valid (srv_in_valid), .in_beat (srv_in_beat), .in_ready (srv_in_ready),
    .out_valid (srv_out_valid), .out_beat (srv_out_beat),
    .buf_valid, .buf_beat, .buf_blk,
    .rxb_valid, .rxb_beat, .rxb_ready,
    .n_intra, .n_inter, .n_unknown
  );

  // buffer and buffer controller
  logic             blk_req_valid, decide, prev_ack;
  logic [BLK_W-1:0] blk_req, cur_blk;
  logic             cur_valid;
  logic [15:0]      pkt_frames, pkt_words, pkt_bytes, frm_cnt, desc_idx, rd_off;
  logic [10:0]      desc_len;
  logic             rd_en;
  logic [31:0]      rd_data;
  buffer_ram #(.N(N), .BLOCK_WORDS(BLOCK_WORDS)) u_buf (
    .clk, .rst_n,
    .wr_valid (buf_valid), .wr_beat (buf_beat), .wr_blk (buf_blk),
    .blk_req_valid, .blk_req,
    .decide, .prev_ack,
    .pkt_frames, .pkt_words, .pkt_bytes,
    .cur_valid, .cur_blk, .frm_cnt, .desc_idx, .desc_len,
    .rd_en, .rd_off, .rd_data,
    .occ_bytes, .n_drop, .n_release, .n_retx
  );

  // label processor
  label_processor #(.N(N), .ID(ID), .PKT_W(PKT_W), .SLOT_W(SLOT_W)) u_lp (
    .clk, .rst_n, .synced, .tx_phase, .prio,
    .blk_req_valid, .blk_req,
    .decide, .prev_req_valid (), .prev_ack,
    .tx_msg (lp_msg), .rx_msg (lbl_rx),
    .n_req, .n_ack, .n_nack
  );

  // data packet aggregator
  data_pkt_tx #(.N(N), .ID(ID), .PKT_W(PKT_W), .SLOT_W(SLOT_W)) u_ptx (
    .clk, .rst_n, .synced, .tx_phase,
    .cur_valid, .cur_blk, .frm_cnt, .desc_idx, .desc_len,
    .rd_en, .rd_off, .rd_data,
    .pkt_frames, .pkt_words, .pkt_bytes,
    .tx_word (data_tx_word), .n_pkt (n_pkt_tx)
  );

  // data packet disaggregator and RX block
  logic        rx_wr_valid, rx_commit, rx_rollback, rx_room;
  frame_beat_t rx_wr_beat;
  logic [31:0] rx_aligned;
  rx_aligner #(.PKT_W(PKT_W)) u_align (
    .clk, .rst_n,
    .in_word (data_rx_word), .out_word (rx_aligned),
    .locked (), .offset (), .n_align (n_rx_align)
  );

  data_pkt_rx #(.ID(ID), .PKT_W(PKT_W)) u_prx (
    .clk, .rst_n,
    .rx_word (rx_aligned), .room (rx_room),
    .wr_valid (rx_wr_valid), .wr_beat (rx_wr_beat),
    .commit (rx_commit), .rollback (rx_rollback),
    .pkt_start (),
    .n_rx_ok, .n_rx_foreign, .n_rx_crc_err, .n_rx_overflow
  );

  rx_block #(.DEPTH(RXB_DEPTH), .ROOM_W(PKT_W)) u_rxb (
    .clk, .rst_n,
    .wr_valid (rx_wr_valid), .wr_beat (rx_wr_beat),
    .commit (rx_commit), .rollback (rx_rollback), .room (rx_room),
    .rd_valid (rxb_valid), .rd_beat (rxb_beat), .rd_ready (rxb_ready)
  );

endmodule
