// tb_rx_block: writes packets' worth of frame beats, commits some and rolls
// back others, reads with random backpressure and checks that exactly the
// committed beats come out, in order, and that room follows the fill level.
module tb_rx_block;
  import ossc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic wr_valid, commit, rollback, room, rd_valid, rd_ready;
  frame_beat_t wr_beat, rd_beat;
  rx_block #(.DEPTH(256), .ROOM_W(100)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  frame_beat_t exp_q [$];
  frame_beat_t tent [$];
  int level = 0;   // beats written and not yet read (committed or not)
  bit reading = 0;

  always @(posedge clk) if (rst_n) begin
    if (rd_valid && rd_ready) begin
      check(exp_q.size() > 0 && rd_beat == exp_q[0], "read beat");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end
  assign rd_ready = reading && ($urandom_range(0, 3) != 0);

  initial begin
    wr_valid = 0; commit = 0; rollback = 0; wr_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 30; p++) begin
      int n; bit good;
      n = int'($urandom_range(10, 90));
      good = ($urandom_range(0, 2) != 0);
      if (p == 3) reading = 1;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        wr_valid = 1;
        wr_beat = '{data: $urandom, sof: k == 0, eof: k == n - 1, last_bytes: 2'($urandom)};
        tent.push_back(wr_beat);
      end
      @(negedge clk);
      wr_valid = 0;
      check(!rd_valid || exp_q.size() > 0, "nothing uncommitted readable");
      if (good) commit = 1; else rollback = 1;
      @(negedge clk);
      commit = 0; rollback = 0;
      if (good) foreach (tent[i]) exp_q.push_back(tent[i]);
      tent.delete();
      #0.2 check(room == ((256 - (exp_q.size())) >= 100), $sformatf("room with %0d held", exp_q.size()));
    end
    reading = 1;
    repeat (600) @(posedge clk);
    check(exp_q.size() == 0 && !rd_valid, "all committed beats read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
