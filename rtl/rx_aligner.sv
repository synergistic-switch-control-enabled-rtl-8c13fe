// rx_aligner: bit-phase alignment of the data channel at a ToR receiver.
//
// All ToRs run at the controller's clock frequency, so a receiver never has
// to recover a frequency, but each packet comes from a different source over
// a different path and so arrives with its own phase: its words can straddle
// the receiver's 32-bit word boundary by any number of bits. Between packets
// the line carries the "1010..." pattern, which shows no boundary. The
// aligner keeps the last three received words and checks all 32 possible
// bit positions at once for the word "three preamble bytes + start packet
// delimiter" (0xAAAAAAAB, where two 1 bits first follow each other). Where
// the switch changes source inside the gap, two idle streams of different
// phase meet and their seam can look the same; a real delimiter is always
// followed by the address word, which is never an idle pattern, so a match
// counts only if the next word at the same position is not 0xAAAAAAAA or
// 0x55555555. The position found is held for the PKT_W words of the packet
// and every word is re-cut at it; between packets the output is the idle
// word. The phase of each packet is thus found from its first word.
//
// Interface and timing: in_word is the raw received word; out_word is the
// aligned word, three cycles after the received word in which that word
// begins, whatever the offset. locked is high while a packet is being
// passed, offset is its bit delay, n_align counts packets found. The
// document states that the receiver only has to align the phase and finds
// preamble and delimiter within one clock cycle; the window of three words,
// the look-ahead at the address word and the holding of the phase for one
// packet are this design's.
module rx_aligner
  import ossc_pkg::*;
#(
  parameter int unsigned PKT_W = PKT_WORDS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] in_word,
  output logic [31:0] out_word,
  output logic        locked,
  output logic [4:0]  offset,
  output logic [31:0] n_align
);

  logic [31:0] prev_q, prev2_q;
  logic [63:0] win, win_next;
  logic        found;
  logic [4:0]  found_k;
  logic [15:0] left_q;

  assign win      = {prev2_q, prev_q};
  assign win_next = {prev_q, in_word};

  // the word that started k bits late is win[63-k -: 32], the word after it
  // win_next[63-k -: 32]
  always_comb begin
    found   = 1'b0;
    found_k = '0;
    for (int k = 31; k >= 0; k--) begin
      if (win[(63 - k) -: 32] == PRE_SPD_WORD &&
          win_next[(63 - k) -: 32] != IDLE_WORD && win_next[(63 - k) -: 32] != ~IDLE_WORD) begin
        found   = 1'b1;
        found_k = 5'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q   <= IDLE_WORD;
      prev2_q  <= IDLE_WORD;
      out_word <= IDLE_WORD;
      locked   <= 1'b0;
      offset   <= '0;
      left_q   <= '0;
      n_align  <= '0;
    end else begin
      prev_q  <= in_word;
      prev2_q <= prev_q;
      if (left_q != '0) begin
        out_word <= win[(63 - 32'(offset)) -: 32];
        left_q   <= left_q - 16'd1;
        locked   <= (left_q != 16'd1);
      end else if (found) begin
        out_word <= PRE_SPD_WORD;
        offset   <= found_k;
        left_q   <= 16'(PKT_W - 1);
        locked   <= 1'b1;
        n_align  <= n_align + 1;
      end else begin
        out_word <= IDLE_WORD;
        locked   <= 1'b0;
      end
    end
  end

endmodule
