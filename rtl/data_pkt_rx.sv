// data_pkt_rx: the receive half of the ToR switch's data packet
// dis/aggregator.
//
// The data channel carries the "1010..." idle pattern between packets. As
// the receiver shares the distributed clock frequency, only the phase has to
// be found; the words arrive aligned here, and the packet start is the word
// whose last byte is the start packet delimiter 0xAB. Bit errors in the
// preamble do not matter. The delimiter is recognised in the cycle it
// arrives and pkt_start is raised one cycle later (3.1 ns at 322 MHz).
// The address word tells the destination rack: a packet for another rack is
// one that lost contention and was sent here only to keep the receiver fed;
// it is dropped. For a packet for this rack, the frames (length header +
// words) are written to the RX block, and committed when the CRC-32 in the
// last word matches, rolled back otherwise. A packet that finds no room in
// the RX block is dropped whole. Packet format as in data_pkt_tx.
module data_pkt_rx
  import ossc_pkg::*;
#(
  parameter int unsigned ID    = 0,
  parameter int unsigned PKT_W = PKT_WORDS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] rx_word,
  input  logic        room,
  output logic        wr_valid,
  output frame_beat_t wr_beat,
  output logic        commit,
  output logic        rollback,
  output logic        pkt_start,
  output logic [31:0] n_rx_ok,
  output logic [31:0] n_rx_foreign,
  output logic [31:0] n_rx_crc_err,
  output logic [31:0] n_rx_overflow
);

  logic        in_pkt;
  logic [15:0] w;        // index of the word now on rx_word
  logic        mine;
  logic        fill;
  logic [15:0] frm_left;
  logic [15:0] frm_len;
  logic        first;
  logic [31:0] crc;

  wire is_hdr = (rx_word[31:16] == 16'd0) && (rx_word[15:0] != 16'd0) &&
                (rx_word[15:0] <= 16'(MAX_FRAME_BYTES));

  always_comb begin
    wr_valid = 1'b0;
    wr_beat  = '{data: rx_word, sof: first, eof: frm_left == 16'd1,
                 last_bytes: frm_len[1:0]};
    if (in_pkt && mine && w >= 16'd2 && 32'(w) <= PKT_W - 2 && frm_left != '0)
      wr_valid = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt <= 1'b0; w <= '0; mine <= 1'b0; fill <= 1'b0;
      frm_left <= '0; frm_len <= '0; first <= 1'b0; crc <= CRC_INIT;
      commit <= 1'b0; rollback <= 1'b0; pkt_start <= 1'b0;
      n_rx_ok <= '0; n_rx_foreign <= '0; n_rx_crc_err <= '0; n_rx_overflow <= '0;
    end else begin
      commit    <= 1'b0;
      rollback  <= 1'b0;
      pkt_start <= 1'b0;
      if (!in_pkt) begin
        if (rx_word[7:0] == SPD_BYTE) begin
          in_pkt    <= 1'b1;
          pkt_start <= 1'b1;
          w         <= 16'd1;
          crc       <= CRC_INIT;
          fill      <= 1'b0;
          frm_left  <= '0;
        end
      end else begin
        w <= w + 16'd1;
        if (w == 16'd1) begin
          crc  <= crc32_word(CRC_INIT, rx_word);
          mine <= (rx_word[15:0] == 16'(ID)) && room;
          if (rx_word[15:0] != 16'(ID)) n_rx_foreign <= n_rx_foreign + 1;
          else if (!room)               n_rx_overflow <= n_rx_overflow + 1;
        end else if (32'(w) <= PKT_W - 2) begin
          crc <= crc32_word(crc, rx_word);
          if (frm_left != '0) begin
            frm_left <= frm_left - 16'd1;
            first    <= 1'b0;
          end else if (!fill && is_hdr) begin
            frm_left <= words_of(rx_word[15:0]);
            frm_len  <= rx_word[15:0];
            first    <= 1'b1;
          end else begin
            fill <= 1'b1;
          end
        end else begin
          // CRC word
          in_pkt <= 1'b0;
          if (mine) begin
            if (~crc == rx_word) begin
              commit  <= 1'b1;
              n_rx_ok <= n_rx_ok + 1;
            end else begin
              rollback     <= 1'b1;
              n_rx_crc_err <= n_rx_crc_err + 1;
            end
          end
        end
      end
    end
  end

endmodule
