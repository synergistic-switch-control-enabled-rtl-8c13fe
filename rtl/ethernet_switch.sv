// ethernet_switch: the ToR switch's Ethernet switch.
//
// Frames from the servers (in_*) are looked at by their destination MAC
// address. Frames for a server of this rack (intra-rack) go straight back out
// to the servers (out_*); frames for another rack (inter-rack) go to the
// buffer block of that rack (buf_*); frames for an unknown rack are dropped.
// Frames the optical network delivered (from the RX block, rxb_*) are also
// sent to the servers, one whole frame at a time, sharing out_* with the
// intra-rack frames.
//
// The rack is read from the destination MAC, which arrives in words 0 and 1
// (bytes 0..5): this design takes byte 4 (word 1 [31:24]) as the rack number
// and byte 5 as the server within it. Each frame is delayed by one beat so
// that word 0 can wait for word 1; after the last word in_ready drops for one
// cycle while the held word leaves. When an intra-rack frame finds the output
// busy with a received frame, the input stalls (in_ready low). The server
// side has no backpressure. Intra/inter-rack forwarding and per-destination
// buffering follow the document; the MAC layout and arbitration are own.
module ethernet_switch
  import ossc_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned ID     = 0,
  localparam int unsigned BLK_W = (N > 2) ? $clog2(N - 1) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the servers
  input  logic             in_valid,
  input  frame_beat_t      in_beat,
  output logic             in_ready,
  // to the servers
  output logic             out_valid,
  output frame_beat_t      out_beat,
  // to the buffer blocks
  output logic             buf_valid,
  output frame_beat_t      buf_beat,
  output logic [BLK_W-1:0] buf_blk,
  // from the RX block
  input  logic             rxb_valid,
  input  frame_beat_t      rxb_beat,
  output logic             rxb_ready,
  // statistics
  output logic [31:0]      n_intra,
  output logic [31:0]      n_inter,
  output logic [31:0]      n_unknown
);

  typedef enum logic [1:0] {S_EMPTY, S_GOT0, S_FWD, S_FLUSH} state_e;
  typedef enum logic [1:0] {R_LOCAL, R_REMOTE, R_DROP} route_e;

  state_e      state;
  frame_beat_t hold;
  route_e      route;
  logic [BLK_W-1:0] blk;
  logic        rxb_busy;   // a received frame owns the output

  logic [7:0]  in_rack;
  route_e      in_route;
  assign in_rack  = in_beat.data[31:24];
  assign in_route = (32'(in_rack) == ID) ? R_LOCAL :
                    (32'(in_rack) < N)   ? R_REMOTE : R_DROP;

  // the local path needs the output from this cycle on
  logic local_claim;
  logic stall;
  always_comb begin
    stall       = (state == S_GOT0) && in_valid && in_route == R_LOCAL && rxb_busy;
    local_claim = ((state == S_FWD || state == S_FLUSH) && route == R_LOCAL) ||
                  ((state == S_GOT0) && in_valid && in_route == R_LOCAL && !rxb_busy);
  end

  assign in_ready  = (state != S_FLUSH) && !stall;
  assign rxb_ready = rxb_busy || !local_claim;

  // the beat leaving the hold register this cycle
  logic        emit;
  route_e      emit_route;
  always_comb begin
    emit       = 1'b0;
    emit_route = route;
    unique case (state)
      S_GOT0:  begin emit = in_valid && !stall; emit_route = in_route; end
      S_FWD:   emit = in_valid;
      S_FLUSH: emit = 1'b1;
      default: ;
    endcase
  end

  always_comb begin
    buf_valid = emit && emit_route == R_REMOTE;
    buf_beat  = hold;
    buf_blk   = (state == S_GOT0) ? ((32'(in_rack) < ID) ? BLK_W'(in_rack) : BLK_W'(in_rack - 8'd1))
                                  : blk;
    out_valid = 1'b0;
    out_beat  = hold;
    if (emit && emit_route == R_LOCAL) begin
      out_valid = 1'b1;
    end else if (rxb_valid && rxb_ready) begin
      out_valid = 1'b1;
      out_beat  = rxb_beat;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_EMPTY; hold <= '0; route <= R_DROP; blk <= '0; rxb_busy <= 1'b0;
      n_intra <= '0; n_inter <= '0; n_unknown <= '0;
    end else begin
      if (rxb_valid && rxb_ready) begin
        if (rxb_beat.sof) rxb_busy <= !rxb_beat.eof;
        else if (rxb_beat.eof) rxb_busy <= 1'b0;
      end
      unique case (state)
        S_EMPTY: if (in_valid && in_beat.sof) begin
          hold  <= in_beat;
          state <= S_GOT0;
        end
        S_GOT0: if (in_valid && !stall) begin
          hold  <= in_beat;
          route <= in_route;
          blk   <= buf_blk;
          state <= in_beat.eof ? S_FLUSH : S_FWD;
          unique case (in_route)
            R_LOCAL:  n_intra   <= n_intra + 1;
            R_REMOTE: n_inter   <= n_inter + 1;
            default:  n_unknown <= n_unknown + 1;
          endcase
        end
        S_FWD: if (in_valid) begin
          hold  <= in_beat;
          if (in_beat.eof) state <= S_FLUSH;
        end
        S_FLUSH: state <= S_EMPTY;
        default: state <= S_EMPTY;
      endcase
    end
  end

endmodule
