// tb_data_pkt_tx: the data packet aggregator (ToR 2 of 4) reading from a
// buffer block modelled here. For several frame mixes it captures the word
// stream and checks, at each slot phase: word 0 = 3-byte preamble + SPD
// (0xAAAAAAAB) at phase 0, the address word, each included frame as a
// length header plus its words in buffer order, as many whole frames as
// fit, the idle pattern after them and in the gap, the CRC-32 (computed here
// independently) in word 649, and the frame/word/byte counts reported to the
// buffer controller. A slot with no block chosen must stay idle.
module tb_data_pkt_tx;
  import ossc_pkg::*;
  localparam int N = 4, ID = 2;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic synced; logic [9:0] tx_phase;
  logic cur_valid; logic [1:0] cur_blk; logic [15:0] frm_cnt, desc_idx; logic [10:0] desc_len;
  logic rd_en; logic [15:0] rd_off; logic [31:0] rd_data;
  logic [15:0] pkt_frames, pkt_words, pkt_bytes;
  logic [31:0] tx_word, n_pkt;
  data_pkt_tx #(.N(N), .ID(ID)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // buffer model
  int lens [$];
  function automatic logic [31:0] bw(input int k);
    return 32'(k) * 32'h0101_0001 + 32'h1357_0000;
  endfunction
  assign desc_len = (int'(desc_idx) < lens.size()) ? 11'(lens[desc_idx]) : 11'd0;
  always_ff @(posedge clk) if (rd_en) rd_data <= bw(int'(rd_off));

  function automatic logic [31:0] crc_ref(input logic [31:0] words [$]);
    logic [31:0] r;
    r = 32'hFFFF_FFFF;
    foreach (words[n]) for (int b = 31; b >= 0; b--) begin
      logic fb; fb = r[31] ^ words[n][b];
      r = r << 1;
      if (fb) r ^= 32'h04C1_1DB7;
    end
    return ~r;
  endfunction

  int phase_i = 0;
  always_ff @(posedge clk) if (rst_n) phase_i <= (phase_i + 1) % SLOT_WORDS;
  assign tx_phase = 10'(phase_i);

  task automatic run_slot(input bit valid, input int blk, input int ls [$]);
    logic [31:0] got [SLOT_WORDS];
    logic [31:0] exp [SLOT_WORDS];
    logic [31:0] crcw [$];
    int w, off, nfr, nby;
    // set up at the decision point
    do begin @(posedge clk); #0.1; end while (phase_i != PKT_WORDS - 1);
    lens = ls; cur_valid = valid; cur_blk = 2'(blk); frm_cnt = 16'(ls.size());
    // capture one full slot from phase 0
    do begin @(posedge clk); #0.1; end while (phase_i != 0);
    for (int p = 0; p < SLOT_WORDS; p++) begin
      got[p] = tx_word;
      if (p == PKT_WORDS - 2 + 1) begin
        // counts are final here
        nfr = int'(pkt_frames); nby = int'(pkt_bytes); off = int'(pkt_words);
      end
      @(posedge clk); #0.1;
    end
    // expected packet
    for (int p = 0; p < SLOT_WORDS; p++) exp[p] = IDLE_WORD;
    if (valid) begin
      int e_fr, e_w, e_by, dst;
      dst = (blk < ID) ? blk : blk + 1;
      exp[0] = 32'hAAAA_AAAB;
      exp[1] = {16'(ID), 16'(dst)};
      w = 2; e_fr = 0; e_w = 0; e_by = 0;
      foreach (ls[f]) begin
        int nw; nw = (ls[f] + 3) / 4;
        if (w + 1 + nw > PKT_WORDS - 1) break;
        exp[w++] = 32'(ls[f]);
        for (int k = 0; k < nw; k++) exp[w++] = bw(e_w + k);
        e_w += nw; e_fr++; e_by += ls[f];
      end
      for (int p = 1; p <= PKT_WORDS - 2; p++) crcw.push_back(exp[p]);
      exp[PKT_WORDS - 1] = crc_ref(crcw);
      check(nfr == e_fr && off == e_w && nby == e_by,
            $sformatf("counts %0d/%0d/%0d vs %0d/%0d/%0d", nfr, off, nby, e_fr, e_w, e_by));
    end
    for (int p = 0; p < SLOT_WORDS; p++)
      check(got[p] == exp[p], $sformatf("word at phase %0d: %h vs %h", p, got[p], exp[p]));
  endtask

  initial begin
    int ls [$];
    int n0;
    synced = 1; cur_valid = 0; cur_blk = 0; frm_cnt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_slot(0, 0, '{});                       // nothing to send: all idle
    n0 = int'(n_pkt);
    run_slot(1, 1, '{1518, 1518});             // only the first fits
    run_slot(1, 0, '{64, 65, 66, 67, 100, 1000});
    ls = '{};
    for (int i = 0; i < 30; i++) ls.push_back(64 + 3 * i);
    run_slot(1, 2, ls);                        // packet full of small frames
    run_slot(1, 2, '{1518, 500, 20});
    run_slot(0, 0, '{100});
    check(int'(n_pkt) >= n0 + 4, "packet counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (664 * 20) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
