// tb_ethernet_switch: the Ethernet switch of rack 2 in a 4-rack cluster.
// Random frames from the servers go to racks 0..3 or to a rack that does not
// exist; at the same time the RX block offers received frames. Checks:
// intra-rack frames come back out whole and in order, inter-rack frames reach
// the buffer with the right block (racks 0,1,3 -> blocks 0,1,2), unknown
// racks are dropped, received frames reach the servers whole and in order,
// and frames never interleave on the server output. Also checks the
// counters and that the input stalls instead of losing data.
module tb_ethernet_switch;
  import ossc_pkg::*;
  localparam int N = 4, ID = 2;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid, in_ready, out_valid, buf_valid, rxb_valid, rxb_ready;
  frame_beat_t in_beat, out_beat, buf_beat, rxb_beat;
  logic [1:0] buf_blk;
  logic [31:0] n_intra, n_inter, n_unknown;
  ethernet_switch #(.N(N), .ID(ID)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // frames: word0 tag, word1 {rack, server, ..}, rest tag-derived
  frame_beat_t in_frames [$];     // beats to send, all frames concatenated
  frame_beat_t rx_frames [$];
  frame_beat_t exp_local [$], exp_rx [$], exp_buf [$];
  int exp_blk [$];
  int e_intra = 0, e_inter = 0, e_unknown = 0;

  task automatic make_frame(input int tag, input int rack, input bit is_rx);
    int len, nw;
    len = int'($urandom_range(64, 300)); nw = (len + 3) / 4;
    for (int k = 0; k < nw; k++) begin
      frame_beat_t b;
      b.data = (k == 1) ? {8'(rack), 8'd5, 16'(tag)} : 32'(tag * 1000 + k);
      b.sof = (k == 0); b.eof = (k == nw - 1); b.last_bytes = 2'(len % 4);
      if (is_rx) begin rx_frames.push_back(b); exp_rx.push_back(b); end
      else begin
        in_frames.push_back(b);
        if (rack == ID) exp_local.push_back(b);
        else if (rack < N) begin exp_buf.push_back(b); exp_blk.push_back(rack < ID ? rack : rack - 1); end
      end
    end
    if (!is_rx) begin
      if (rack == ID) e_intra++; else if (rack < N) e_inter++; else e_unknown++;
    end
  endtask

  // drivers
  int in_i = 0, rx_i = 0;
  bit in_on = 0, rx_on = 0;
  always_comb begin
    in_valid = in_on && in_i < in_frames.size();
    in_beat  = in_valid ? in_frames[in_i] : '0;
    rxb_valid = rx_on && rx_i < rx_frames.size();
    rxb_beat  = rxb_valid ? rx_frames[rx_i] : '0;
  end
  // monitors: server output split by source (tag ranges), buffer output
  bit in_out_frame = 0; bit out_is_rx = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) in_i <= in_i + 1;
    if (rxb_valid && rxb_ready) rx_i <= rx_i + 1;
    in_on <= ($urandom_range(0, 5) != 0);
    rx_on <= ($urandom_range(0, 3) != 0);
    if (out_valid) begin
      bit is_rx;
      is_rx = out_beat.sof ? (out_beat.data >= 32'd5_000_000) : out_is_rx;
      if (out_beat.sof) begin
        check(!in_out_frame, "frame starts only after the previous one ended");
        out_is_rx <= is_rx;
      end else check(in_out_frame, "beat inside a frame");
      in_out_frame <= !out_beat.eof;
      if (is_rx) begin
        check(exp_rx.size() > 0 && out_beat == exp_rx[0], "received frame beat");
        if (exp_rx.size() > 0) void'(exp_rx.pop_front());
      end else begin
        check(exp_local.size() > 0 && out_beat == exp_local[0], "intra-rack beat");
        if (exp_local.size() > 0) void'(exp_local.pop_front());
      end
    end
    if (buf_valid) begin
      check(exp_buf.size() > 0 && buf_beat == exp_buf[0] && int'(buf_blk) == exp_blk[0], "buffer beat and block");
      if (exp_buf.size() > 0) begin void'(exp_buf.pop_front()); void'(exp_blk.pop_front()); end
    end
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int r; r = int'($urandom_range(0, 5));
      make_frame(t, (r == 5) ? 9 : (r == 4 ? ID : r), 0);
    end
    for (int t = 0; t < 100; t++) make_frame(5000 + t, ID, 1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (in_i == in_frames.size() && rx_i == rx_frames.size());
    repeat (10) @(posedge clk);
    check(exp_local.size() == 0 && exp_rx.size() == 0 && exp_buf.size() == 0, "everything delivered");
    check(n_intra == 32'(e_intra) && n_inter == 32'(e_inter) && n_unknown == 32'(e_unknown), "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
