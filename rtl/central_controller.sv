// central_controller: the arbitration core of the switch controller.
//
// Slotted operation. The controller keeps the master time (ctrl_time) and the
// slot phase (0 .. SLOT_WORDS-1). Label requests {destination, priority}
// from the N ToR switches are latched into the request matrix as they
// arrive; the ToRs time them to arrive at the start of the inter-packet gap
// (phase PKT_WORDS) that precedes the slot they ask for. Two cycles later
// (ARB_PHASE) the matrix is arbitrated in one step:
//   * every output goes to the requester with the best priority (lowest
//     priority number, then lowest port index) - the packet "wins";
//   * the inputs left without an output (packets that lost contention first,
//     then inputs with no request) are spread, in port order, over the
//     outputs nobody won, so that every receiver keeps getting a signal;
//   * each requester gets a label response carrying the output it was given:
//     equal to its request means ACK, different means NACK.
// Responses and the gate configuration are registered in the next cycle, so
// a request on the label line at phase PKT_WORDS leaves as a response on the
// line at phase PKT_WORDS+4: 4 cycles = 12.4 ns, the document's label
// processing time. The matrix is cleared after each arbitration.
//
// Time synchronisation: a timestamp message (LT_TS) from a ToR is returned
// unchanged one cycle later (LT_TS_ECHO); afterwards the controller sends
// that ToR its current time (LT_TIME) in the next free cycle. An echo that
// would fall on the response cycle is not sent; the ToR retries.
//
// Follows the document: priority arbitration, losers to undestined racks,
// ACK = response equal to request, 12.4 ns processing, timestamp loop and
// time distribution. Own choices: the message layout, the tie-break by port
// index, the order in which losers are spread, dropping colliding echoes.
module central_controller
  import ossc_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned PKT_W      = PKT_WORDS,
  parameter int unsigned SLOT_W     = SLOT_WORDS,
  localparam int unsigned IDX_W     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned PH_W      = $clog2(SLOT_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  label_msg_t        rx_msg   [N],
  output label_msg_t        tx_msg   [N],
  // slot timing
  output logic [TIME_W-1:0] ctrl_time,
  output logic [PH_W-1:0]   slot_phase,
  // arbitration result for the gate manager: output j takes input cfg_src[j]
  output logic              cfg_valid,
  output logic [IDX_W-1:0]  cfg_src  [N],
  // statistics
  output logic [31:0]       n_arb,        // arbitrations with at least one request
  output logic [31:0]       n_contention, // slots in which some output was contended
  output logic [31:0]       n_nack        // NACK responses sent
);

  localparam int unsigned ARB_PHASE = PKT_W + 2;
  localparam int unsigned TMOD      = SLOT_W * (1 << 18);

  // ---------------- time and slot phase ----------------
  function automatic logic [TIME_W-1:0] time_inc(input logic [TIME_W-1:0] t);
    return (t == TIME_W'(TMOD - 1)) ? '0 : t + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_time  <= '0;
      slot_phase <= '0;
    end else begin
      ctrl_time  <= time_inc(ctrl_time);
      slot_phase <= (slot_phase == PH_W'(SLOT_W - 1)) ? '0 : slot_phase + 1'b1;
    end
  end

  wire arb_now = (slot_phase == PH_W'(ARB_PHASE));

  // ---------------- request matrix ----------------
  logic             req_v    [N];
  logic [IDX_W-1:0] req_dest [N];
  logic [7:0]       req_prio [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        req_v[i] <= 1'b0; req_dest[i] <= '0; req_prio[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (arb_now) req_v[i] <= 1'b0;
        if (rx_msg[i].valid && rx_msg[i].ltype == LT_REQ &&
            rx_msg[i].payload[15:8] < 8'(N)) begin
          req_v[i]    <= 1'b1;
          req_dest[i] <= IDX_W'(rx_msg[i].payload[15:8]);
          req_prio[i] <= rx_msg[i].payload[7:0];
        end
      end
    end
  end

  // ---------------- arbitration (combinational) ----------------
  logic             win_v   [N];  // output j has a winner
  logic [IDX_W-1:0] win_src [N];
  logic             granted [N];  // input i won its destination
  logic [IDX_W-1:0] asg_src [N];  // source finally given to output j
  logic [IDX_W-1:0] asg_out [N];  // output finally given to input i
  logic             contended;

  always_comb begin
    logic [IDX_W-1:0] order [N];
    int n_left, k, n_req_j;
    contended = 1'b0;
    for (int j = 0; j < N; j++) begin
      win_v[j]   = 1'b0;
      win_src[j] = '0;
      n_req_j    = 0;
      for (int i = 0; i < N; i++) begin
        if (req_v[i] && req_dest[i] == IDX_W'(j)) begin
          n_req_j++;
          if (!win_v[j] || req_prio[i] < req_prio[win_src[j]]) begin
            win_v[j]   = 1'b1;
            win_src[j] = IDX_W'(i);
          end
        end
      end
      if (n_req_j > 1) contended = 1'b1;
    end
    for (int i = 0; i < N; i++) granted[i] = req_v[i] && win_v[req_dest[i]] &&
                                              win_src[req_dest[i]] == IDX_W'(i);
    // inputs without an output: losers first, then inputs with no request
    n_left = 0;
    for (int i = 0; i < N; i++) order[i] = '0;
    for (int i = 0; i < N; i++)
      if (req_v[i] && !granted[i]) begin order[n_left] = IDX_W'(i); n_left++; end
    for (int i = 0; i < N; i++)
      if (!req_v[i]) begin order[n_left] = IDX_W'(i); n_left++; end
    // spread them over the outputs nobody won
    k = 0;
    for (int i = 0; i < N; i++) asg_out[i] = '0;
    for (int j = 0; j < N; j++) begin
      if (win_v[j]) asg_src[j] = win_src[j];
      else begin
        asg_src[j] = order[k];
        k++;
      end
      asg_out[asg_src[j]] = IDX_W'(j);
    end
  end

  // ---------------- responses, echoes, time ----------------
  logic time_pend [N];
  logic any_req;
  always_comb begin
    any_req = 1'b0;
    for (int i = 0; i < N; i++) any_req |= req_v[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        tx_msg[i]    <= LABEL_NONE;
        time_pend[i] <= 1'b0;
        cfg_src[i]   <= '0;
      end
      cfg_valid    <= 1'b0;
      n_arb        <= '0;
      n_contention <= '0;
      n_nack       <= '0;
    end else begin
      cfg_valid <= arb_now;
      if (arb_now) for (int j = 0; j < N; j++) cfg_src[j] <= asg_src[j];
      if (arb_now && any_req) n_arb <= n_arb + 1;
      if (arb_now && contended) n_contention <= n_contention + 1;
      for (int i = 0; i < N; i++) begin
        tx_msg[i] <= LABEL_NONE;
        if (arb_now) begin
          if (req_v[i]) begin
            tx_msg[i] <= make_rsp(8'(asg_out[i]));
          end
        end else if (rx_msg[i].valid && rx_msg[i].ltype == LT_TS) begin
          tx_msg[i]    <= '{valid: 1'b1, ltype: LT_TS_ECHO, payload: rx_msg[i].payload};
          time_pend[i] <= 1'b1;
        end else if (time_pend[i]) begin
          tx_msg[i]    <= '{valid: 1'b1, ltype: LT_TIME, payload: time_inc(ctrl_time)};
          time_pend[i] <= 1'b0;
        end
      end
      if (arb_now) begin
        logic [31:0] nn;
        nn = '0;
        for (int i = 0; i < N; i++) if (req_v[i] && !granted[i]) nn++;
        n_nack <= n_nack + nn;
      end
    end
  end

endmodule
