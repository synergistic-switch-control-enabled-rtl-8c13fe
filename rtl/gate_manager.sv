// gate_manager: drives the SOA gates of the optical switch from the
// controller's arbitration result.
//
// A new configuration (for each output, the input that feeds it) arrives
// with cfg_valid a few cycles into the inter-packet gap. The gate manager
// holds it and switches all gates together at the end of slot phase
// GATE_PHASE, inside the gap: with the default 657 the new gates stand from
// phase 658, 8 cycles (24.8 ns) after the last word of the old packet passed
// the switch and 6 cycles (18.6 ns) before the first word of the new one.
// The gap has to hold the label processing (12.4 ns), the SOA driver delay,
// the SOA switching time and a margin; the exact split of the 14 cycles is
// this design's. Exactly one gate per output is on
// once a configuration has been applied; before the first one all gates are
// off. The one-hot decoding and the moment of switching are this design's
// choices; the document only names the block.
module gate_manager
  import ossc_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned SLOT_W     = SLOT_WORDS,
  parameter int unsigned GATE_PHASE = PKT_WORDS + 7,
  localparam int unsigned IDX_W     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned PH_W      = $clog2(SLOT_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PH_W-1:0]  slot_phase,
  input  logic             cfg_valid,
  input  logic [IDX_W-1:0] cfg_src [N],
  output logic             gate    [N][N],  // gate[i][j]: input i to output j
  output logic [31:0]      n_reconfig       // gate updates that changed a gate
);

  logic             pend_v;
  logic [IDX_W-1:0] pend_src [N];
  logic             next_gate [N][N];
  logic             changed;

  always_comb begin
    changed = 1'b0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        next_gate[i][j] = (pend_src[j] == IDX_W'(i));
        if (next_gate[i][j] != gate[i][j]) changed = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_v     <= 1'b0;
      n_reconfig <= '0;
      for (int j = 0; j < N; j++) pend_src[j] <= '0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) gate[i][j] <= 1'b0;
    end else begin
      if (cfg_valid) begin
        pend_v <= 1'b1;
        for (int j = 0; j < N; j++) pend_src[j] <= cfg_src[j];
      end
      if (slot_phase == PH_W'(GATE_PHASE) && pend_v) begin
        gate <= next_gate;
        if (changed) n_reconfig <= n_reconfig + 1;
      end
    end
  end

endmodule
