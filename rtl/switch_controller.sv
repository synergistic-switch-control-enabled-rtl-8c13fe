// switch_controller: the FPGA-based optical switch controller of one cluster.
//
// One label packet dis/aggregator per port turns the label channel words
// into messages and back; the central controller arbitrates the label
// requests of every slot, answers with label responses (ACK/NACK), echoes
// timestamps and distributes its time; the gate manager turns each
// arbitration result into SOA gate control signals applied inside the
// inter-packet gap. The transceivers and the on-board clock source that
// drives clk (and thereby every ToR, via the continuous label channels) are
// outside this logic. Timing: a request word on label_rx_word at slot phase
// PKT_W gives a response word on label_tx_word at phase PKT_W+4 and the new
// gate setting at phase GATE_PHASE.
module switch_controller
  import ossc_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned PKT_W      = PKT_WORDS,
  parameter int unsigned SLOT_W     = SLOT_WORDS,
  parameter int unsigned GATE_PHASE = PKT_W + 7,
  localparam int unsigned PH_W      = $clog2(SLOT_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       label_rx_word [N],
  output logic [31:0]       label_tx_word [N],
  output logic              gate          [N][N],
  output logic [TIME_W-1:0] ctrl_time,
  output logic [PH_W-1:0]   slot_phase,
  output logic [31:0]       n_arb,
  output logic [31:0]       n_contention,
  output logic [31:0]       n_nack,
  output logic [31:0]       n_reconfig
);

  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1;

  label_msg_t       rx_msg  [N];
  label_msg_t       tx_msg  [N];
  logic             cfg_valid;
  logic [IDX_W-1:0] cfg_src [N];

  for (genvar p = 0; p < N; p++) begin : g_port
    label_codec u_codec (
      .clk, .rst_n,
      .tx_msg  (tx_msg[p]),
      .tx_word (label_tx_word[p]),
      .rx_word (label_rx_word[p]),
      .rx_msg  (rx_msg[p])
    );
  end

  central_controller #(.N(N), .PKT_W(PKT_W), .SLOT_W(SLOT_W)) u_cc (
    .clk, .rst_n,
    .rx_msg, .tx_msg,
    .ctrl_time, .slot_phase,
    .cfg_valid, .cfg_src,
    .n_arb, .n_contention, .n_nack
  );

  gate_manager #(.N(N), .SLOT_W(SLOT_W), .GATE_PHASE(GATE_PHASE)) u_gm (
    .clk, .rst_n,
    .slot_phase, .cfg_valid, .cfg_src,
    .gate, .n_reconfig
  );

endmodule
