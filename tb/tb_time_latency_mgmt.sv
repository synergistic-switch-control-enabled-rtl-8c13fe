// tb_time_latency_mgmt: the ToR's time synchronisation against a controller
// and fibre modelled here. The fibre is D = 23 cycles each way; the model
// answers a timestamp after the fixed loop latency (5 + 2D cycles from the
// ToR's message register to its receive register) and then sends its time
// with the age the message has when it reaches the ToR register (2 + D). The first
// timestamp is ignored to exercise the retry. Checks: the retry comes after
// RETRY cycles, the measured delay is D, local time then equals the
// controller's time every cycle, and tx_phase equals (controller time + D)
// modulo the 664-cycle slot.
module tb_time_latency_mgmt;
  import ossc_pkg::*;
  localparam int D = 23;
  localparam int RETRY = 64;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  label_msg_t rx_msg, tx_msg;
  logic synced;
  logic [15:0] link_delay;
  logic [TIME_W-1:0] local_time;
  logic [9:0] tx_phase;
  time_latency_mgmt #(.RETRY(RETRY)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ctrl = 5000;   // controller time during the current cycle
  int cyc = 0;
  int n_ts = 0, t_first = -1, t_second = -1;
  int echo_at = -1, time_at = -1;
  logic [27:0] echo_pl;
  int synced_checks = 0;

  initial begin
    rx_msg = LABEL_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    forever begin
      @(posedge clk); #0.2;
      cyc++; ctrl = (ctrl + 1) % TIME_MOD;
      rx_msg = LABEL_NONE;
      if (tx_msg.valid && tx_msg.ltype == LT_TS) begin
        n_ts++;
        if (n_ts == 1) t_first = cyc;
        else if (n_ts == 2) begin
          t_second = cyc;
          echo_at = cyc + 5 + 2 * D;
          echo_pl = tx_msg.payload;
          check(tx_msg.payload == local_time, "timestamp carries the ToR time");
        end
      end
      if (cyc == echo_at) begin
        rx_msg = '{valid: 1'b1, ltype: LT_TS_ECHO, payload: echo_pl};
        time_at = cyc + 7;
      end
      if (cyc == time_at) rx_msg = '{valid: 1'b1, ltype: LT_TIME, payload: 28'((ctrl - 2 - D + TIME_MOD) % TIME_MOD)};
      if (synced && time_at > 0 && cyc > time_at) begin
        check(local_time == 28'(ctrl), $sformatf("local time %0d vs %0d", local_time, ctrl));
        check(int'(tx_phase) == (ctrl + D) % SLOT_WORDS, "tx phase");
        synced_checks++;
        if (synced_checks == 2000) break;
      end
      check(!(synced && (time_at < 0 || cyc <= time_at)), "not synced before the time message");
    end
    check(t_second - t_first == RETRY + 1, $sformatf("retry after %0d cycles", t_second - t_first));
    check(link_delay == 16'(D), $sformatf("measured delay %0d", link_delay));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
