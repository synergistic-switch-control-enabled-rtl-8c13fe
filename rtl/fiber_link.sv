// fiber_link: behavioural model of an optical fibre (label or data channel),
// not synthesizable hardware of the design. It delays a 32-bit word stream by
// DELAY clock cycles (DELAY = 0 is a straight wire) plus BIT_DELAY bit times
// (0..31). The different channel lengths the time synchronisation has to
// cope with are modelled by giving each link its own DELAY; BIT_DELAY models
// the part of a word time by which a path is longer, so that words arrive
// straddling the receiver's word boundary. Bits are sent most significant
// first: with a bit delay b the received word is the last b bits of the
// previous word followed by the first 32-b bits of the current one. The line
// starts out carrying the idle pattern. Serialisation and optics are not
// modelled.
module fiber_link
  import ossc_pkg::*;
#(
  parameter int unsigned DELAY     = 4,
  parameter int unsigned BIT_DELAY = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] in_word,
  output logic [31:0] out_word
);

  logic [31:0] word_out;

  if (DELAY == 0) begin : g_wire
    assign word_out = in_word;
  end else begin : g_line
    logic [31:0] line_q [DELAY];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DELAY; i++) line_q[i] <= IDLE_WORD;
      end else begin
        line_q[0] <= in_word;
        for (int i = 1; i < DELAY; i++) line_q[i] <= line_q[i-1];
      end
    end
    assign word_out = line_q[DELAY-1];
  end

  if (BIT_DELAY == 0) begin : g_aligned
    assign out_word = word_out;
  end else begin : g_skew
    logic [BIT_DELAY-1:0] last_q;   // low bits of the previous word
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) last_q <= BIT_DELAY'(IDLE_WORD);
      else        last_q <= word_out[BIT_DELAY-1:0];
    end
    assign out_word = {last_q, word_out[31:BIT_DELAY]};
  end

endmodule
