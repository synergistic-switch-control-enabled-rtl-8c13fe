// rx_block: the receive block of the ToR switch buffer, holding frames taken
// out of optical data packets until the Ethernet switch passes them to the
// servers.
//
// A first-word-fall-through FIFO of frame beats with a commit point: the
// packet disaggregator writes the frames of a packet tentatively, then either
// commits them (CRC good, packet for this rack) or rolls them back, so the
// reader never sees frames of a corrupted or misdirected packet. room tells
// whether a whole packet's worth of words (ROOM_W) is free. Read side:
// rd_valid/rd_beat/rd_ready, rd_beat valid in the same cycle. The document
// only names the block; the commit/rollback scheme is this design's.
module rx_block
  import ossc_pkg::*;
#(
  parameter int unsigned DEPTH  = 2048,  // beats, power of two
  parameter int unsigned ROOM_W = PKT_WORDS,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_valid,
  input  frame_beat_t wr_beat,
  input  logic        commit,
  input  logic        rollback,
  output logic        room,
  output logic        rd_valid,
  output frame_beat_t rd_beat,
  input  logic        rd_ready
);

  frame_beat_t mem [DEPTH];
  logic [AW:0] wr_ptr, commit_ptr, rd_ptr;

  assign room     = ((AW+1)'(DEPTH) - (wr_ptr - rd_ptr)) >= (AW+1)'(ROOM_W);
  assign rd_valid = (rd_ptr != commit_ptr);
  assign rd_beat  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      commit_ptr <= '0;
      rd_ptr     <= '0;
    end else begin
      if (rollback)      wr_ptr <= commit_ptr;
      else if (wr_valid) wr_ptr <= wr_ptr + 1'b1;
      if (commit)        commit_ptr <= wr_valid ? wr_ptr + 1'b1 : wr_ptr;
      if (rd_valid && rd_ready) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && !rollback) mem[wr_ptr[AW-1:0]] <= wr_beat;
  end

endmodule
