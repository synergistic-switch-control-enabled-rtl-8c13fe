// tb_label_processor: the ToR label processor (ID 1 of 4, so blocks 0,1,2
// hold traffic for racks 0,2,3). Over many slots with a random block choice
// it checks that decide pulses once per slot at tx phase 648, that the label
// request leaves at phase 649 (reaching the controller at 650) with the right
// rack and priority, and that a returned response equal to the request
// gives ACK, a different one NACK, and no response NACK; also the counters.
module tb_label_processor;
  import ossc_pkg::*;
  localparam int N = 4;
  localparam int ID = 1;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic synced;
  logic [9:0] tx_phase;
  logic [7:0] prio;
  logic blk_req_valid;
  logic [1:0] blk_req;
  logic decide, prev_req_valid, prev_ack;
  label_msg_t tx_msg, rx_msg;
  logic [31:0] n_req, n_ack, n_nack;
  label_processor #(.N(N), .ID(ID)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int e_req = 0, e_ack = 0, e_nack = 0;
    int dest, kind;   // kind 0: ACK, 1: NACK, 2: no response
    bit req_v;
    synced = 0; tx_phase = 0; prio = 8'd2; blk_req_valid = 0; blk_req = 0; rx_msg = LABEL_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!decide, "no decision before sync");
    synced = 1;
    req_v = 0; kind = 2; dest = 0;
    for (int cyc = 0; cyc < 664 * 40; cyc++) begin
      tx_phase = 10'(cyc % 664);
      rx_msg = LABEL_NONE;
      if (tx_phase == 10'(PKT_WORDS - 2)) begin
        // result of the previous request, seen by the buffer controller now
        check(prev_req_valid == req_v, "prev_req_valid");
        if (req_v) check(prev_ack == (kind == 0), $sformatf("ack result kind %0d", kind));
        if (req_v && kind == 2) e_nack++;
        blk_req_valid = ($urandom_range(0, 4) != 0);
        blk_req       = 2'($urandom_range(0, 2));
        prio          = 8'($urandom_range(1, 9));
      end
      if (tx_phase == 10'(PKT_WORDS + 10) && req_v && kind != 2)
        rx_msg = make_rsp(kind == 0 ? 8'(dest) : 8'(ID));
      #0.1;
      check(decide == (tx_phase == 10'(PKT_WORDS - 2)), "decide pulse");
      @(posedge clk); #0.2;
      if (tx_phase == 10'(PKT_WORDS - 2)) begin
        req_v = blk_req_valid;
        dest  = (blk_req < ID) ? int'(blk_req) : int'(blk_req) + 1;
        kind  = int'($urandom_range(0, 2));
        if (req_v) begin
          e_req++;
          if (kind == 0) e_ack++;
          if (kind == 1) e_nack++;
          check(tx_msg.valid && tx_msg.ltype == LT_REQ && tx_msg.payload[15:8] == 8'(dest) &&
                tx_msg.payload[7:0] == prio, $sformatf("request to rack %0d", dest));
        end else check(!tx_msg.valid, "no request without a block");
      end else check(!tx_msg.valid, "request only at the decision");
      @(negedge clk);
    end
    check(n_req == 32'(e_req) && n_ack == 32'(e_ack) && n_nack == 32'(e_nack),
          $sformatf("counters %0d/%0d/%0d vs %0d/%0d/%0d", n_req, n_ack, n_nack, e_req, e_ack, e_nack));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (664 * 45) @(posedge clk);
    failures++; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
