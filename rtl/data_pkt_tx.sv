// data_pkt_tx: the transmit half of the ToR switch's data packet
// dis/aggregator. It builds one fixed-length optical data packet per slot
// from the frames of the chosen buffer block and sends the "1010..." idle
// pattern in every gap and in slots without a packet.
//
// Packet (PKT_W words of 32 bits, first word first):
//   word 0          preamble (3 bytes 1010...) + start packet delimiter 0xAB
//   word 1          address: source rack [31:16], destination rack [15:0]
//   words 2..PKT_W-2  frames, each as a length header word followed by the
//                   frame's words, then the idle pattern to the end
//   word PKT_W-1    CRC-32 of words 1..PKT_W-2
// Frames are taken in order from the head of the block, as many whole frames
// as fit; they are copied, not removed - the buffer controller releases them
// on ACK. pkt_frames/pkt_words/pkt_bytes report what the packet holds; they
// are final from slot phase PKT_W-4 on and held until the next packet starts.
//
// Timing: tx_phase is the phase at which a word put on the fibre now arrives
// at the switch. Word w is planned (and the RAM read issued) at tx phase
// w-2 and registered onto tx_word at phase w-1, so it is on the fibre at
// phase w and reaches the switch at slot phase w, aligned with the gates.
// The field order, sizes and idle fill follow the document; the length
// header, word alignment of frames and the CRC coverage are own choices.
module data_pkt_tx
  import ossc_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned ID     = 0,
  parameter int unsigned PKT_W  = PKT_WORDS,
  parameter int unsigned SLOT_W = SLOT_WORDS,
  localparam int unsigned BLK_W = (N > 2) ? $clog2(N - 1) : 1,
  localparam int unsigned PH_W  = $clog2(SLOT_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             synced,
  input  logic [PH_W-1:0]  tx_phase,
  // block chosen for this slot and its contents
  input  logic             cur_valid,
  input  logic [BLK_W-1:0] cur_blk,
  input  logic [15:0]      frm_cnt,
  output logic [15:0]      desc_idx,
  input  logic [10:0]      desc_len,
  output logic             rd_en,
  output logic [15:0]      rd_off,
  input  logic [31:0]      rd_data,
  // what the packet holds
  output logic [15:0]      pkt_frames,
  output logic [15:0]      pkt_words,
  output logic [15:0]      pkt_bytes,
  // data channel
  output logic [31:0]      tx_word,
  output logic [31:0]      n_pkt
);

  typedef enum logic [2:0] {K_IDLE, K_PRE, K_ADDR, K_HDR, K_DATA, K_FILL, K_CRC} kind_e;

  // ---------------- stage A: plan word w ----------------
  logic [PH_W-1:0] w;
  assign w = (32'(tx_phase) + 2 >= SLOT_W) ? PH_W'(32'(tx_phase) + 2 - SLOT_W)
                                           : PH_W'(32'(tx_phase) + 2);

  logic        active;
  logic [15:0] frm_left;
  logic        done;
  kind_e       a_kind;
  logic [15:0] need;

  assign desc_idx = pkt_frames;
  assign rd_off   = pkt_words;
  assign need     = 16'd1 + words_of(16'(desc_len));

  always_comb begin
    a_kind = K_IDLE;
    if (synced) begin
      if (w == '0) a_kind = cur_valid ? K_PRE : K_IDLE;
      else if (active) begin
        if (w == PH_W'(1)) a_kind = K_ADDR;
        else if (32'(w) <= PKT_W - 2) begin
          if (frm_left != '0) a_kind = K_DATA;
          else if (!done && pkt_frames < frm_cnt && 32'(need) <= PKT_W - 1 - 32'(w))
            a_kind = K_HDR;
          else a_kind = K_FILL;
        end else if (32'(w) == PKT_W - 1) a_kind = K_CRC;
      end
    end
  end
  assign rd_en = (a_kind == K_DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      frm_left   <= '0;
      done       <= 1'b0;
      pkt_frames <= '0;
      pkt_words  <= '0;
      pkt_bytes  <= '0;
    end else if (synced) begin
      if (w == '0) begin
        active     <= cur_valid;
        frm_left   <= '0;
        done       <= 1'b0;
        pkt_frames <= '0;
        pkt_words  <= '0;
        pkt_bytes  <= '0;
      end else if (32'(w) == PKT_W) begin
        active <= 1'b0;
      end
      unique case (a_kind)
        K_HDR: begin
          frm_left   <= words_of(16'(desc_len));
          pkt_frames <= pkt_frames + 16'd1;
          pkt_bytes  <= pkt_bytes + 16'(desc_len);
        end
        K_DATA: begin
          frm_left  <= frm_left - 16'd1;
          pkt_words <= pkt_words + 16'd1;
        end
        K_FILL: done <= 1'b1;
        default: ;
      endcase
    end
  end

  // ---------------- stage B: form the word ----------------
  kind_e       b_kind;
  logic [10:0] b_len;
  logic [31:0] crc;
  logic [31:0] b_word;
  logic [7:0]  dst_rack;

  assign dst_rack = (32'(cur_blk) < ID) ? 8'(cur_blk) : 8'(cur_blk) + 8'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_kind <= K_IDLE;
      b_len  <= '0;
    end else begin
      b_kind <= a_kind;
      b_len  <= desc_len;
    end
  end

  always_comb begin
    unique case (b_kind)
      K_PRE:   b_word = PRE_SPD_WORD;
      K_ADDR:  b_word = {16'(ID), 8'd0, dst_rack};
      K_HDR:   b_word = frame_header(16'(b_len));
      K_DATA:  b_word = rd_data;
      K_CRC:   b_word = ~crc;
      default: b_word = IDLE_WORD;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_word <= IDLE_WORD;
      crc     <= CRC_INIT;
      n_pkt   <= '0;
    end else begin
      tx_word <= b_word;
      if (b_kind == K_PRE) begin
        crc   <= CRC_INIT;
        n_pkt <= n_pkt + 1;
      end else if (b_kind inside {K_ADDR, K_HDR, K_DATA, K_FILL}) begin
        crc <= crc32_word(crc, b_word);
      end
    end
  end

endmodule
