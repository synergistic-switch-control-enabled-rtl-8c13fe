// label_processor: the ToR switch's label processor (optical flow control,
// ToR side).
//
// Once per slot, at the decision point, it takes the buffer block the buffer
// controller chose and sends a label request {destination rack, priority}
// for it, timed so that the request reaches the controller exactly at the
// start of the inter-packet gap (controller phase PKT_W) before the slot in
// which the packet will pass the switch. The decision point is tx phase
// PKT_W-2: one cycle for this register and one for the label codec.
// When the label response comes back it is compared with the request: an
// equal label is an ACK (the packet will reach its destination, its frames
// may be released), a different one a NACK (the packet will be sent to
// another rack as filler and must be retransmitted). The result is held for
// the buffer controller until the next decision; a missing response counts
// as NACK. Buffer block b holds traffic for rack b when b < ID, else for
// rack b+1. The request/response comparison follows the document; the
// decision timing and block numbering are this design's choices.
module label_processor
  import ossc_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned ID     = 0,
  parameter int unsigned PKT_W  = PKT_WORDS,
  parameter int unsigned SLOT_W = SLOT_WORDS,
  localparam int unsigned BLK_W = (N > 2) ? $clog2(N - 1) : 1,
  localparam int unsigned PH_W  = $clog2(SLOT_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             synced,
  input  logic [PH_W-1:0]  tx_phase,
  input  logic [7:0]       prio,
  // from the buffer controller
  input  logic             blk_req_valid,
  input  logic [BLK_W-1:0] blk_req,
  // to the buffer controller
  output logic             decide,
  output logic             prev_req_valid,  // a request was made at the last decision
  output logic             prev_ack,        // ... and it was acknowledged
  // label channel
  output label_msg_t       tx_msg,
  input  label_msg_t       rx_msg,
  // statistics
  output logic [31:0]      n_req,
  output logic [31:0]      n_ack,
  output logic [31:0]      n_nack
);

  logic [7:0] req_dest;
  logic [7:0] sel_dest;
  logic       rsp_seen;

  assign decide   = synced && (tx_phase == PH_W'(PKT_W - 2));
  assign sel_dest = (32'(blk_req) < ID) ? 8'(blk_req) : 8'(blk_req) + 8'd1;

  wire rsp_now = rx_msg.valid && rx_msg.ltype == LT_RSP && prev_req_valid && !rsp_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_msg         <= LABEL_NONE;
      req_dest       <= '0;
      prev_req_valid <= 1'b0;
      prev_ack       <= 1'b0;
      rsp_seen       <= 1'b0;
      n_req          <= '0;
      n_ack          <= '0;
      n_nack         <= '0;
    end else begin
      tx_msg <= LABEL_NONE;
      if (decide) begin
        if (prev_req_valid && !rsp_seen) n_nack <= n_nack + 1;  // lost response
        prev_req_valid <= blk_req_valid;
        prev_ack       <= 1'b0;
        rsp_seen       <= 1'b0;
        if (blk_req_valid) begin
          tx_msg   <= make_req(sel_dest, prio);
          req_dest <= sel_dest;
          n_req    <= n_req + 1;
        end
      end else if (rsp_now) begin
        rsp_seen <= 1'b1;
        if (rx_msg.payload[7:0] == req_dest) begin
          prev_ack <= 1'b1;
          n_ack    <= n_ack + 1;
        end else begin
          n_nack   <= n_nack + 1;
        end
      end
    end
  end

endmodule
