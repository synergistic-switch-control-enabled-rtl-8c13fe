// soa_switch: behavioural model of the N x N SOA-based broadcast-and-select
// optical switch; it stands for an optical part, not for logic of the design.
// Each input is split 1:N, every split copy passes an SOA gate, and the N
// gates that end on one output are joined by a coupler. The model works on
// the 32-bit words of the data channels: output j carries the OR of the
// inputs whose gate (i -> j) is on, and nothing (all zeros, no light) when no
// gate is on. One input driving several outputs is the multicast the
// controller may use. Switching is ideal: a gate change acts in the same
// cycle. The driver delay and the 6 ns rise/fall time are budgeted by the
// gate manager's timing in the inter-packet gap, not modelled here.
module soa_switch
  import ossc_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [31:0] in_word  [N],
  input  logic        gate     [N][N],  // gate[i][j]: input i to output j
  output logic [31:0] out_word [N]
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_word[j] = '0;
      for (int i = 0; i < N; i++)
        if (gate[i][j]) out_word[j] = out_word[j] | in_word[i];
    end
  end

endmodule
