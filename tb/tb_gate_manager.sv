// tb_gate_manager: feeds arbitration results at the response cycle of each
// slot and checks that the SOA gates stay put until slot phase 657 (inside
// the gap), then switch all at once to a one-hot-per-output setting that
// matches the configuration; checks that nothing is on before the first
// configuration and counts reconfigurations.
module tb_gate_manager;
  import ossc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic [9:0] slot_phase;
  logic       cfg_valid;
  logic [1:0] cfg_src [N];
  logic       gate [N][N];
  logic [31:0] n_reconfig;
  gate_manager #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cur [N];      // applied setting, -1 = none
  int pend [N];
  int n_changes = 0;

  initial begin
    slot_phase = 0; cfg_valid = 0;
    for (int j = 0; j < N; j++) begin cfg_src[j] = 0; cur[j] = -1; pend[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 664 * 12; cyc++) begin
      @(negedge clk);
      slot_phase = 10'(cyc % 664);
      cfg_valid = (slot_phase == 10'(PKT_WORDS + 3));
      if (cfg_valid) begin
        // a random permutation
        int p [N];
        for (int j = 0; j < N; j++) p[j] = j;
        for (int j = N - 1; j > 0; j--) begin
          int k, t; k = int'($urandom_range(0, j)); t = p[j]; p[j] = p[k]; p[k] = t;
        end
        if (cyc / 664 == 5) for (int j = 0; j < N; j++) p[j] = pend[j];  // repeat: no change
        for (int j = 0; j < N; j++) begin cfg_src[j] = 2'(p[j]); end
      end
      @(posedge clk);
      if (cfg_valid) for (int j = 0; j < N; j++) pend[j] = int'(cfg_src[j]);
      if (slot_phase == 10'(PKT_WORDS + 7)) begin
        bit ch;
        ch = 0;
        for (int j = 0; j < N; j++) begin if (cur[j] != pend[j]) ch = 1; cur[j] = pend[j]; end
        if (ch) n_changes++;
      end
      #0.5;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          check(gate[i][j] == (cur[j] == i), $sformatf("gate %0d->%0d at phase %0d", i, j, slot_phase));
    end
    check(n_reconfig == 32'(n_changes), $sformatf("reconfig count %0d vs %0d", n_reconfig, n_changes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (664 * 20) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
