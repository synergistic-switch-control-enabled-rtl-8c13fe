// buffer_ram: the ToR switch's electrical buffer (RAM) with its buffer
// controller.
//
// The RAM is split into N-1 buffer blocks, one per destination rack. Frames
// from the Ethernet switch are written into the block of their destination
// rack; a frame only counts once its last word is in (a descriptor with its
// byte length is then pushed). A frame that finds less than one maximum
// frame of free space (or no free descriptor) in its block is dropped whole.
// The controller keeps each block's occupancy in bytes.
//
// At every slot decision (decide) the controller:
//   * releases the frames of the packet just sent (pkt_frames/pkt_words/
//     pkt_bytes, reported by the packet aggregator) if that packet's label
//     was acknowledged;
//   * otherwise, if it was refused (NACK), keeps them and chooses the same
//     block again, so the same frames are sent in the next slot;
//   * else chooses the most occupied non-empty block (ties: lowest block).
// The choice is offered combinationally (blk_req_valid/blk_req) to the label
// processor and latched at decide as cur_blk for the packet aggregator,
// which then copies frames from the head of the block without removing them.
// All blocks have the same size, so "most occupied" by bytes equals "highest
// occupation ratio". Reads: rd_data holds the word at offset rd_off from the
// head of cur_blk one cycle after rd_en; desc_len is the length of the
// frame desc_idx places after the head, combinationally.
//
// Follows the document: per-destination blocks, occupancy monitoring,
// most-occupied selection, copy then release on ACK, retransmit on NACK.
// Own choices: block size (the document leaves it configurable), descriptor
// scheme, drop rule, one write and one read port.
module buffer_ram
  import ossc_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter int unsigned BLOCK_WORDS = 2048,  // 8 KiB per block, power of two
  localparam int unsigned NB         = N - 1,
  localparam int unsigned BLK_W      = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned AW         = $clog2(BLOCK_WORDS),
  localparam int unsigned DESC_DEPTH = BLOCK_WORDS / 16,  // 64-byte frames at most
  localparam int unsigned DW         = $clog2(DESC_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // frames from the Ethernet switch
  input  logic             wr_valid,
  input  frame_beat_t      wr_beat,
  input  logic [BLK_W-1:0] wr_blk,
  // block choice, to the label processor
  output logic             blk_req_valid,
  output logic [BLK_W-1:0] blk_req,
  // slot decision, from the label processor
  input  logic             decide,
  input  logic             prev_ack,
  // packet just built, from the packet aggregator
  input  logic [15:0]      pkt_frames,
  input  logic [15:0]      pkt_words,
  input  logic [15:0]      pkt_bytes,
  // read port for the packet aggregator
  output logic             cur_valid,
  output logic [BLK_W-1:0] cur_blk,
  output logic [15:0]      frm_cnt,
  input  logic [15:0]      desc_idx,
  output logic [10:0]      desc_len,
  input  logic             rd_en,
  input  logic [15:0]      rd_off,
  output logic [31:0]      rd_data,
  // monitoring
  output logic [31:0]      occ_bytes [NB],
  output logic [31:0]      n_drop,
  output logic [31:0]      n_release,
  output logic [31:0]      n_retx
);

  logic [31:0] mem  [NB * BLOCK_WORDS];
  logic [10:0] desc [NB * DESC_DEPTH];

  logic [AW-1:0] head_ptr  [NB];
  logic [AW-1:0] wr_ptr    [NB];
  logic [AW:0]   used      [NB];   // words written, committed or not
  logic [DW-1:0] desc_head [NB];
  logic [DW:0]   desc_cnt  [NB];

  // ---------------- write side ----------------
  typedef enum logic [1:0] {W_IDLE, W_STORE, W_DROP} wstate_e;
  wstate_e          wstate;
  logic [BLK_W-1:0] w_blk;
  logic [15:0]      w_words;
  logic [AW:0]      free_w;

  assign free_w = (AW+1)'(BLOCK_WORDS) - used[wr_blk];

  wire accept_sof = wr_valid && wr_beat.sof && free_w >= (AW+1)'(MAX_FRAME_WORDS) &&
                    desc_cnt[wr_blk] < (DW+1)'(DESC_DEPTH);
  wire store_now  = wr_valid && ((wstate == W_IDLE && wr_beat.sof && accept_sof) ||
                                 (wstate == W_STORE && !wr_beat.sof));
  wire [BLK_W-1:0] s_blk = (wstate == W_IDLE) ? wr_blk : w_blk;
  wire             push  = store_now && wr_beat.eof;
  wire [15:0]      s_words = (wstate == W_IDLE) ? 16'd1 : w_words + 16'd1;
  wire [10:0]      push_len = 11'((s_words - 16'd1) * 16'd4 +
                                  ((wr_beat.last_bytes == 2'd0) ? 16'd4 : 16'(wr_beat.last_bytes)));

  // ---------------- selection ----------------
  wire release_now = decide && cur_valid && prev_ack;
  wire retx_now    = decide && cur_valid && !prev_ack;

  always_comb begin
    logic [31:0] eff;
    logic [31:0] best;
    blk_req_valid = 1'b0;
    blk_req       = '0;
    best          = '0;
    eff           = '0;
    if (cur_valid && !prev_ack) begin
      blk_req_valid = 1'b1;
      blk_req       = cur_blk;
    end else begin
      for (int b = 0; b < NB; b++) begin
        eff = occ_bytes[b];
        if (cur_valid && cur_blk == BLK_W'(b)) eff = eff - 32'(pkt_bytes);
        if (eff > best) begin
          best          = eff;
          blk_req_valid = 1'b1;
          blk_req       = BLK_W'(b);
        end
      end
    end
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate    <= W_IDLE;
      w_blk     <= '0;
      w_words   <= '0;
      cur_valid <= 1'b0;
      cur_blk   <= '0;
      n_drop    <= '0;
      n_release <= '0;
      n_retx    <= '0;
      for (int b = 0; b < NB; b++) begin
        head_ptr[b] <= '0; wr_ptr[b] <= '0; used[b] <= '0;
        desc_head[b] <= '0; desc_cnt[b] <= '0; occ_bytes[b] <= '0;
      end
    end else begin
      // write state machine
      if (wr_valid) begin
        unique case (wstate)
          W_IDLE: if (wr_beat.sof) begin
            if (accept_sof) begin
              w_blk   <= wr_blk;
              w_words <= 16'd1;
              wstate  <= wr_beat.eof ? W_IDLE : W_STORE;
            end else begin
              n_drop <= n_drop + 1;
              wstate <= wr_beat.eof ? W_IDLE : W_DROP;
            end
          end
          W_STORE: begin
            w_words <= w_words + 16'd1;
            if (wr_beat.eof) wstate <= W_IDLE;
          end
          W_DROP: if (wr_beat.eof) wstate <= W_IDLE;
          default: wstate <= W_IDLE;
        endcase
      end
      // per-block pointers and counts (one write and one release at a time)
      for (int b = 0; b < NB; b++) begin
        logic rel, st, ps;
        rel = release_now && cur_blk == BLK_W'(b);
        st  = store_now && s_blk == BLK_W'(b);
        ps  = push && s_blk == BLK_W'(b);
        if (st) wr_ptr[b] <= wr_ptr[b] + 1'b1;
        used[b]      <= used[b] + (st ? (AW+1)'(1) : '0) - (rel ? (AW+1)'(pkt_words) : '0);
        desc_cnt[b]  <= desc_cnt[b] + (ps ? (DW+1)'(1) : '0) - (rel ? (DW+1)'(pkt_frames) : '0);
        occ_bytes[b] <= occ_bytes[b] + (ps ? 32'(push_len) : '0) - (rel ? 32'(pkt_bytes) : '0);
        if (rel) begin
          head_ptr[b]  <= head_ptr[b] + AW'(pkt_words);
          desc_head[b] <= desc_head[b] + DW'(pkt_frames);
        end
      end
      // slot decision
      if (release_now) n_release <= n_release + 1;
      if (retx_now)    n_retx    <= n_retx + 1;
      if (decide) begin
        cur_valid <= blk_req_valid;
        cur_blk   <= blk_req;
      end
    end
  end

  // addresses inside a block wrap at the block size
  logic [AW-1:0] rd_addr;
  logic [DW-1:0] desc_wr_addr, desc_rd_addr;
  assign rd_addr      = head_ptr[cur_blk] + AW'(rd_off);
  assign desc_wr_addr = desc_head[s_blk] + DW'(desc_cnt[s_blk]);
  assign desc_rd_addr = desc_head[cur_blk] + DW'(desc_idx);

  // memories (no reset)
  always_ff @(posedge clk) begin
    if (store_now) mem[32'(s_blk) * BLOCK_WORDS + 32'(wr_ptr[s_blk])] <= wr_beat.data;
    if (push) desc[32'(s_blk) * DESC_DEPTH + 32'(desc_wr_addr)] <= push_len;
    if (rd_en) rd_data <= mem[32'(cur_blk) * BLOCK_WORDS + 32'(rd_addr)];
  end

  assign frm_cnt  = 16'(desc_cnt[cur_blk]);
  assign desc_len = desc[32'(cur_blk) * DESC_DEPTH + 32'(desc_rd_addr)];

endmodule
