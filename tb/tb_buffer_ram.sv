// tb_buffer_ram: the buffer blocks and buffer controller of a ToR (3 blocks
// of 2048 words). Writes frames of known content, then checks occupancy in
// bytes, the most-occupied choice, copying by descriptor and word reads,
// release on ACK (the head moves on and the next frames are read), keeping
// the block and the frames on NACK (retransmission), dropping a frame that
// finds less than a maximum frame of space (overflow), and wrap-around of
// the block's circular storage.
module tb_buffer_ram;
  import ossc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic wr_valid; frame_beat_t wr_beat; logic [1:0] wr_blk;
  logic blk_req_valid; logic [1:0] blk_req;
  logic decide, prev_ack;
  logic [15:0] pkt_frames, pkt_words, pkt_bytes;
  logic cur_valid; logic [1:0] cur_blk; logic [15:0] frm_cnt, desc_idx; logic [10:0] desc_len;
  logic rd_en; logic [15:0] rd_off; logic [31:0] rd_data;
  logic [31:0] occ_bytes [3]; logic [31:0] n_drop, n_release, n_retx;
  buffer_ram #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] dw(input int tag, input int k);
    return {8'(tag), 8'hC3, 16'(k)} ^ 32'(k * 7919);
  endfunction

  // model of each block: queue of (tag, len)
  int q_tag [3][$], q_len [3][$];
  int occ [3];

  task automatic write_frame(input int b, input int len, input int tag, input bit expect_drop);
    int nw; nw = (len + 3) / 4;
    for (int k = 0; k < nw; k++) begin
      @(negedge clk);
      wr_valid = 1; wr_blk = 2'(b);
      wr_beat = '{data: dw(tag, k), sof: k == 0, eof: k == nw - 1, last_bytes: 2'(len % 4)};
    end
    @(negedge clk); wr_valid = 0;
    if (!expect_drop) begin q_tag[b].push_back(tag); q_len[b].push_back(len); occ[b] += len; end
  endtask

  task automatic check_occ();
    #0.1;
    for (int b = 0; b < 3; b++) check(occ_bytes[b] == 32'(occ[b]), $sformatf("occupancy of block %0d: %0d vs %0d", b, occ_bytes[b], occ[b]));
  endtask

  // read the first nf frames of cur_blk and compare
  task automatic read_frames(input int nf, output int words, output int bytes);
    int off; off = 0; bytes = 0;
    for (int f = 0; f < nf; f++) begin
      int len, nw, b;
      b = int'(cur_blk);
      @(negedge clk); desc_idx = 16'(f); #0.1;
      len = q_len[b][f]; nw = (len + 3) / 4;
      check(int'(desc_len) == len, $sformatf("descriptor %0d: %0d vs %0d", f, desc_len, len));
      for (int k = 0; k < nw; k++) begin
        @(negedge clk); rd_en = 1; rd_off = 16'(off + k);
        @(posedge clk); #0.1; rd_en = 0;
        if (k % 17 == 0 || k == nw - 1) check(rd_data == dw(q_tag[b][f], k), $sformatf("word %0d of frame %0d", k, f));
      end
      off += nw; bytes += len;
    end
    words = off;
  endtask

  task automatic do_decide(input bit ack, input int nf, input int nw, input int nb);
    @(negedge clk);
    decide = 1; prev_ack = ack;
    pkt_frames = 16'(nf); pkt_words = 16'(nw); pkt_bytes = 16'(nb);
    @(negedge clk);
    decide = 0;
    if (ack && nf > 0) begin
      int b; b = -1;
      // released block is the one that was current before this decision
      b = last_blk;
      for (int f = 0; f < nf; f++) begin void'(q_tag[b].pop_front()); void'(q_len[b].pop_front()); end
      occ[b] -= nb;
    end
  endtask
  int last_blk;

  initial begin
    int w, by, drops0;
    wr_valid = 0; wr_beat = '0; wr_blk = 0; decide = 0; prev_ack = 0;
    pkt_frames = 0; pkt_words = 0; pkt_bytes = 0; desc_idx = 0; rd_en = 0; rd_off = 0;
    for (int b = 0; b < 3; b++) occ[b] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #0.1 check(!blk_req_valid, "empty buffer: no request");
    write_frame(0, 100, 1, 0);
    write_frame(1, 1500, 2, 0);
    write_frame(2, 64, 3, 0);
    write_frame(0, 1517, 4, 0);
    write_frame(1, 65, 5, 0);
    check_occ();
    check(blk_req_valid && blk_req == 2'd0, "most occupied is block 0 (1617 bytes)");
    // choose block 0 for the next packet
    do_decide(0, 0, 0, 0);
    check(cur_valid && cur_blk == 2'd0 && frm_cnt == 16'd2, "block 0 current with 2 frames");
    last_blk = 0;
    read_frames(2, w, by);
    // NACK: same block chosen again, nothing released
    #0.1 check(blk_req_valid && blk_req == 2'd0, "NACK keeps the block");
    do_decide(0, 2, w, by);
    check(n_retx == 1 && cur_blk == 2'd0, "retransmission counted");
    check_occ();
    read_frames(2, w, by);
    // ACK: released; block 0 is then empty, block 1 most occupied
    pkt_frames = 16'd2; pkt_words = 16'(w); pkt_bytes = 16'(by); prev_ack = 1;
    #0.1;
    check(blk_req_valid && blk_req == 2'd1, "after release block 1 is chosen");
    do_decide(1, 2, w, by);
    check(n_release == 1 && cur_blk == 2'd1, "release counted");
    check_occ();
    last_blk = 1;
    // overflow: fill block 2 with maximum frames
    drops0 = int'(n_drop);
    for (int i = 0; i < 5; i++) write_frame(2, 1518, 10 + i, 0);
    write_frame(2, 1518, 20, 1);
    check(int'(n_drop) == drops0 + 1, "frame dropped when the block is full");
    check_occ();
    // wrap-around: push block 1 through its storage several times
    for (int r = 0; r < 12; r++) begin
      write_frame(1, 700 + r * 37, 30 + r, 0);
      write_frame(1, 800 - r * 11, 60 + r, 0);
      #0.1;
      begin
        int nf;
        last_blk = int'(cur_blk);
        nf = (q_len[last_blk].size() < 2) ? q_len[last_blk].size() : 2;
        if (!cur_valid) nf = 0;
        if (nf > 0) read_frames(nf, w, by); else begin w = 0; by = 0; end
        do_decide(1, nf, w, by);   // ACK; the most occupied block is next
      end
      check_occ();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
