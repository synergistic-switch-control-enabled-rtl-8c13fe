// label_codec: the label packet dis/aggregator found at both ends of every
// label channel (one per port in the switch controller, one per ToR switch).
//
// The label channel is a continuous 32-bit word stream: it must never go
// quiet because the ToR recovers the distributed clock from it. The
// aggregator therefore sends one label message per word when it has one and
// the "1010..." idle word otherwise. The disaggregator turns each received
// word back into a message; idle words and unknown types give no message.
//
// Timing: tx_msg is registered onto tx_word one cycle later; rx_word is
// registered into rx_msg one cycle later. Both registers reset to "no
// message" (idle on the line). The word layout is defined in ossc_pkg and is
// this design's choice; the document only names the block and says that the
// channel carries label requests, responses (ACK/NACK), timestamps and time.
module label_codec
  import ossc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // aggregator: message to the line
  input  label_msg_t  tx_msg,
  output logic [31:0] tx_word,
  // disaggregator: line to message
  input  logic [31:0] rx_word,
  output label_msg_t  rx_msg
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_word <= IDLE_WORD;
      rx_msg  <= LABEL_NONE;
    end else begin
      tx_word <= label_encode(tx_msg);
      rx_msg  <= label_decode(rx_word);
    end
  end

endmodule
