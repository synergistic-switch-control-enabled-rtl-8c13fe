// tb_soa_switch: random gate settings (permutations, multicast, all off) and
// random inputs on a 4 x 4 switch model; every output is compared with the
// input its gate selects, or zero (no light) when no gate is on.
module tb_soa_switch;
  localparam int N = 4;
  logic [31:0] in_word [N], out_word [N];
  logic        gate [N][N];
  soa_switch #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int src [N];
    for (int n = 0; n < 300; n++) begin
      // each output picks at most one source (an input may feed several)
      for (int j = 0; j < N; j++) src[j] = int'($urandom_range(0, N)); // N = off
      for (int i = 0; i < N; i++) begin
        in_word[i] = $urandom;
        for (int j = 0; j < N; j++) gate[i][j] = (src[j] == i);
      end
      #1;
      for (int j = 0; j < N; j++)
        check(out_word[j] == ((src[j] == N) ? 32'd0 : in_word[src[j]]),
              $sformatf("output %0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
