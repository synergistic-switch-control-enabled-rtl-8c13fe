// tb_rx_aligner: a received bit stream made of segments, each with its own
// bit phase. Every segment starts with a seam (a few alternating bits of
// random parity, as when the switch changes source between two idle
// streams), then idle words, a short packet (preamble + delimiter word,
// address word, random data, sometimes a data word equal to the delimiter
// word) and idle words. Checks that every packet comes out whole, in order,
// at its bit offset and with the fixed latency, that nothing but the idle
// word appears between packets, that seams never start a false packet, and
// that all 32 offsets were exercised.
module tb_rx_aligner;
  import ossc_pkg::*;
  localparam int PW = 20;
  localparam int NPKT = 400;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic [31:0] in_word, out_word, n_align;
  logic        locked;
  logic [4:0]  offset;
  rx_aligner #(.PKT_W(PW)) dut (.clk, .rst_n, .in_word, .out_word, .locked, .offset, .n_align);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  bit          bq[$];
  logic [31:0] exp_w[$];     // expected words of all packets, in order
  int          exp_off[$];   // bit offset of each packet
  int          exp_word[$];  // received word index where each packet starts
  int          seen_off[32];

  task automatic push_word(input logic [31:0] w);
    for (int i = 31; i >= 0; i--) bq.push_back(w[i]);
  endtask

  // builds the whole stream before the run
  task automatic build();
    for (int p = 0; p < NPKT; p++) begin
      int  r     = $urandom_range(0, 31);
      bit  first = $urandom_range(0, 1);
      for (int i = 0; i < r; i++) bq.push_back(first ^ bit'(i % 2));
      repeat ($urandom_range(2, 5)) push_word(IDLE_WORD);
      exp_off.push_back(bq.size() % 32);
      exp_word.push_back(bq.size() / 32);
      for (int w = 0; w < PW; w++) begin
        logic [31:0] d;
        if (w == 0)      d = PRE_SPD_WORD;
        else if (w == 1) d = {16'($urandom_range(0, 15)), 16'($urandom_range(0, 15))};
        else if ($urandom_range(0, 9) == 0) d = PRE_SPD_WORD;
        else             d = $urandom;
        push_word(d);
        exp_w.push_back(d);
      end
      repeat ($urandom_range(2, 4)) push_word(IDLE_WORD);
    end
    repeat (8) push_word(IDLE_WORD);
  endtask

  int cyc = 0;
  int in_pkt = 0;
  int npk = 0;
  int nwords;
  initial begin
    build();
    nwords = bq.size() / 32;
    in_word = IDLE_WORD;
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // word i of the stream is on in_word during cycle i
  always @(posedge clk) if (rst_n) begin
    logic [31:0] w;
    // monitor: sees out_word as set at the previous edge
    if (cyc > 0) begin
      if (in_pkt == 0) begin
        if (out_word == PRE_SPD_WORD) begin
          check(exp_off.size() > 0, "packet found beyond the stream");
          if (exp_off.size() > 0) begin
            int o, s;
            o = exp_off.pop_front();
            s = exp_word.pop_front();
            check(offset == 5'(o), $sformatf("packet %0d offset %0d, expected %0d", npk, offset, o));
            check(cyc - 1 == s + 3, $sformatf("packet %0d out at cycle %0d, started in word %0d", npk, cyc - 1, s));
            check(locked, "locked at the first word");
            seen_off[o]++;
            check(out_word == exp_w.pop_front(), "first word");
          end
          in_pkt = PW - 1;
          npk++;
        end else begin
          check(out_word == IDLE_WORD, $sformatf("idle between packets, got %08h at cycle %0d", out_word, cyc - 1));
        end
      end else begin
        check(exp_w.size() > 0 && out_word == exp_w.pop_front(),
              $sformatf("packet %0d word %0d", npk - 1, PW - in_pkt));
        in_pkt--;
      end
    end
    // driver
    w = IDLE_WORD;
    if (bq.size() >= 32) for (int i = 0; i < 32; i++) w = {w[30:0], bq.pop_front()};
    in_word <= w;
    cyc++;
    if (cyc == nwords + 10) begin
      check(npk == NPKT, $sformatf("%0d packets out of %0d", npk, NPKT));
      check(n_align == 32'(NPKT), $sformatf("n_align %0d", n_align));
      check(exp_w.size() == 0, "all words delivered");
      for (int k = 0; k < 32; k++) check(seen_off[k] > 0, $sformatf("offset %0d exercised", k));
      $display("packets %0d, words %0d", npk, nwords);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
