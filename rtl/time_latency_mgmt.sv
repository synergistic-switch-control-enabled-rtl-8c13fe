// time_latency_mgmt: the ToR switch's time and latency management center.
//
// At start-up it sends a timestamp (LT_TS) carrying its own free-running
// time T_TX over the label channel. The controller returns it unchanged
// (LT_TS_ECHO); the arrival time T_RX gives the round trip. Subtracting the
// fixed processing of both label codecs and the controller (LOOP_FIXED = 5
// cycles) and halving gives the one-way fibre delay D in cycles, whatever
// the length of this ToR's label fibre. The controller then sends its time
// (LT_TIME), stamped with its time in the cycle the message sits in its
// output register. The message is 2 + D cycles old when it is decoded here and is loaded one
// cycle later, so local_time = received time + D + 3 equals the controller's
// time from then on. If no echo comes back within RETRY cycles the timestamp is resent.
//
// Outputs: synced, the delay D, local_time, and tx_phase: the controller's
// slot phase at which a word this ToR puts on its fibre in the current cycle
// reaches the far end (local time + D, modulo the slot). The ToR uses it to
// launch label requests and data packets so that they arrive aligned with
// the controller's slots. Data and label fibres of one ToR are taken to be
// equally long. The message formats and fixed latencies are this design's;
// the round-trip measurement and time distribution follow the document.
module time_latency_mgmt
  import ossc_pkg::*;
#(
  parameter int unsigned SLOT_W     = SLOT_WORDS,
  parameter int unsigned RETRY      = 2048,
  parameter int unsigned LOOP_FIXED = 5,
  localparam int unsigned PH_W      = $clog2(SLOT_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  label_msg_t        rx_msg,
  output label_msg_t        tx_msg,     // timestamp to send (valid for one cycle)
  output logic              synced,
  output logic [15:0]       link_delay,
  output logic [TIME_W-1:0] local_time,
  output logic [PH_W-1:0]   tx_phase
);

  localparam int unsigned TMOD = SLOT_W * (1 << 18);

  function automatic logic [TIME_W-1:0] tadd(input logic [TIME_W-1:0] a, input logic [TIME_W:0] b);
    logic [TIME_W+1:0] s;
    s = (TIME_W+2)'(a) + (TIME_W+2)'(b);
    if (s >= (TIME_W+2)'(TMOD)) s = s - (TIME_W+2)'(TMOD);
    return s[TIME_W-1:0];
  endfunction

  typedef enum logic [1:0] {S_SEND, S_WAIT_ECHO, S_WAIT_TIME, S_SYNCED} state_e;
  state_e            state;
  logic [15:0]       wait_cnt;
  logic [TIME_W-1:0] rtt;
  logic [TIME_W-1:0] t_new;

  assign rtt    = local_time - rx_msg.payload;  // wrap is harmless for short loops
  assign t_new  = tadd(rx_msg.payload, (TIME_W+1)'(3) + (TIME_W+1)'(link_delay));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_SEND;
      tx_msg     <= LABEL_NONE;
      wait_cnt   <= '0;
      link_delay <= '0;
      local_time <= '0;
      tx_phase   <= '0;
      synced     <= 1'b0;
    end else begin
      tx_msg     <= LABEL_NONE;
      local_time <= tadd(local_time, (TIME_W+1)'(1));
      tx_phase   <= (tx_phase == PH_W'(SLOT_W - 1)) ? '0 : tx_phase + 1'b1;
      unique case (state)
        S_SEND: begin
          tx_msg   <= '{valid: 1'b1, ltype: LT_TS, payload: tadd(local_time, (TIME_W+1)'(1))};
          wait_cnt <= '0;
          state    <= S_WAIT_ECHO;
        end
        S_WAIT_ECHO: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (rx_msg.valid && rx_msg.ltype == LT_TS_ECHO) begin
            link_delay <= 16'((rtt - TIME_W'(LOOP_FIXED)) >> 1);
            wait_cnt   <= '0;
            state      <= S_WAIT_TIME;
          end else if (wait_cnt == 16'(RETRY - 1)) begin
            state <= S_SEND;
          end
        end
        S_WAIT_TIME: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (rx_msg.valid && rx_msg.ltype == LT_TIME) begin
            local_time <= t_new;
            tx_phase   <= PH_W'((32'(t_new) + 32'(link_delay)) % SLOT_W);
            synced     <= 1'b1;
            state      <= S_SYNCED;
          end else if (wait_cnt == 16'(RETRY - 1)) begin
            state <= S_SEND;
          end
        end
        S_SYNCED: begin
          // later time messages keep the clock aligned
          if (rx_msg.valid && rx_msg.ltype == LT_TIME) begin
            local_time <= t_new;
            tx_phase   <= PH_W'((32'(t_new) + 32'(link_delay)) % SLOT_W);
          end
        end
        default: state <= S_SEND;
      endcase
    end
  end

endmodule
