// tb_data_pkt_rx: the data packet disaggregator of rack 1. Packets are built
// here (preamble+SPD, address, length-headed frames, idle fill, CRC-32) and
// sent between idle gaps. Checks: the start is found in the cycle the SPD
// word arrives (pkt_start one cycle later) even with bit errors in the
// preamble; frames of a good packet for this rack come out beat by beat with
// sof/eof/last_bytes and are committed; a packet for another rack writes
// nothing (filler after lost contention); a corrupted packet is rolled back;
// a packet that finds no room is dropped; the counters agree.
module tb_data_pkt_rx;
  import ossc_pkg::*;
  localparam int ID = 1;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic [31:0] rx_word;
  logic room, wr_valid, commit, rollback, pkt_start;
  frame_beat_t wr_beat;
  logic [31:0] n_rx_ok, n_rx_foreign, n_rx_crc_err, n_rx_overflow;
  data_pkt_rx #(.ID(ID)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

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

  frame_beat_t exp_beats [$];
  frame_beat_t got_beats [$];
  int n_commit = 0, n_rollback = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (wr_valid) got_beats.push_back(wr_beat);
    if (commit) n_commit <= n_commit + 1;
    if (rollback) n_rollback <= n_rollback + 1;
  end

  task automatic send_packet(input int dst, input int ls [$], input bit corrupt, input bit pre_err);
    logic [31:0] pk [$];
    logic [31:0] cw [$];
    int seed;
    pk.push_back(pre_err ? 32'hCAAA_8AAB : 32'hAAAA_AAAB);
    pk.push_back({16'd3, 16'(dst)});
    seed = int'($urandom);
    foreach (ls[f]) begin
      int nw; nw = (ls[f] + 3) / 4;
      pk.push_back(32'(ls[f]));
      for (int k = 0; k < nw; k++) begin
        frame_beat_t b;
        b.data = 32'(seed) + 32'(k * 977 + f * 13);
        b.sof = (k == 0); b.eof = (k == nw - 1); b.last_bytes = 2'(ls[f] % 4);
        pk.push_back(b.data);
        if (dst == ID && room && !corrupt) exp_beats.push_back(b);
      end
    end
    while (pk.size() < PKT_WORDS - 1) pk.push_back(IDLE_WORD);
    for (int i = 1; i < PKT_WORDS - 1; i++) cw.push_back(pk[i]);
    pk.push_back(crc_ref(cw));
    if (corrupt) pk[300] ^= 32'h0000_0100;
    foreach (pk[i]) begin
      @(negedge clk); rx_word = pk[i];
      if (i == 1) check(pkt_start, "packet start one cycle after the SPD word");
      else if (i > 1) check(!pkt_start, "single start pulse");
    end
    repeat (14) begin @(negedge clk); rx_word = IDLE_WORD; end
  endtask

  initial begin
    int ls [$];
    rx_word = IDLE_WORD; room = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    send_packet(1, '{64, 1518, 100}, 0, 0);
    send_packet(1, '{65, 66, 67}, 0, 1);      // preamble bit errors
    send_packet(2, '{500, 500}, 0, 0);        // for another rack
    send_packet(1, '{800, 200}, 1, 0);        // corrupted
    room = 0;
    send_packet(1, '{300}, 0, 0);             // no room
    room = 1;
    ls = '{};
    for (int i = 0; i < 15; i++) ls.push_back(64 + i * 5);
    send_packet(1, ls, 0, 0);
    send_packet(3, '{1518}, 0, 0);
    repeat (5) @(negedge clk);
    // the corrupted packet's beats were written and rolled back: 250 beats
    check(got_beats.size() == exp_beats.size() + 250, $sformatf("beats written %0d", got_beats.size()));
    begin
      int g; g = 0;
      foreach (exp_beats[i]) begin
        // skip the rolled-back packet's beats (fourth packet, after 3+3 frames)
        if (g == 16 + 380 + 25 + 17 + 17 + 17) g += 250;
        check(g < got_beats.size() && got_beats[g] == exp_beats[i], $sformatf("beat %0d", i));
        g++;
      end
    end
    check(n_commit == 3 && n_rollback == 1, $sformatf("commits %0d rollbacks %0d", n_commit, n_rollback));
    check(n_rx_ok == 3 && n_rx_foreign == 2 && n_rx_crc_err == 1 && n_rx_overflow == 1, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
