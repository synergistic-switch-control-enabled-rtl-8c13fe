// ossc_pkg: types, constants and helper functions shared by the optical
// switch control system (ToR switches, switch controller, optical switch).
//
// All logic runs on one clock: the controller's master clock, which the
// label channels distribute to every ToR. One clock cycle carries one 32-bit
// word of a 10 Gb/s lane (3.1 ns per word). A data packet is 2600 bytes
// (650 words) and the inter-packet gap (IPG) is 43.4 ns (14 words), so one
// time slot is 664 cycles. The packet layout (3-byte preamble, 1-byte start
// packet delimiter, 4-byte source/destination rack address, aggregated
// frames, 4-byte CRC) and the "1010..." fill of gaps and idle parts follow
// the document. The label word encoding, the per-frame length header inside
// a packet and the CRC details are this design's own choices.
package ossc_pkg;

  // ---------------- sizes of the demonstrated system ----------------
  localparam int unsigned PKT_WORDS   = 650;  // 2600-byte data packet
  localparam int unsigned IPG_WORDS   = 14;   // 43.4 ns / 3.1 ns
  localparam int unsigned SLOT_WORDS  = PKT_WORDS + IPG_WORDS;
  localparam int unsigned MAX_FRAME_BYTES = 1518;
  localparam int unsigned MIN_FRAME_BYTES = 64;
  localparam int unsigned MAX_FRAME_WORDS = (MAX_FRAME_BYTES + 3) / 4;  // 380

  // ---------------- line patterns ----------------
  // "1010..." transitions sent in every gap and idle part.
  localparam logic [31:0] IDLE_WORD    = 32'hAAAA_AAAA;
  // 3-byte preamble followed by the start packet delimiter 8'b1010_1011.
  localparam logic [31:0] PRE_SPD_WORD = 32'hAAAA_AAAB;
  localparam logic [7:0]  SPD_BYTE     = 8'hAB;

  // ---------------- time ----------------
  localparam int unsigned TIME_W = 28;
  // Time counters wrap at a multiple of the slot so that the slot phase can
  // always be derived from the time value.
  localparam int unsigned TIME_MOD = SLOT_WORDS * (1 << 18);

  // ---------------- label channel messages ----------------
  // Word layout: [31:28] type, [27:0] payload. A word whose type nibble is
  // 4'hA is the idle pattern and carries no message.
  typedef enum logic [3:0] {
    LT_REQ     = 4'h1,  // label request: [15:8] destination port, [7:0] priority
    LT_RSP     = 4'h2,  // label response: [7:0] output port the packet was given
    LT_TS      = 4'h3,  // timestamp from a ToR: [27:0] ToR time at sending
    LT_TS_ECHO = 4'h4,  // timestamp returned by the controller unchanged
    LT_TIME    = 4'h5   // controller time: [27:0] controller time at sending
  } label_type_e;

  typedef struct packed {
    logic        valid;
    label_type_e ltype;
    logic [27:0] payload;
  } label_msg_t;

  localparam label_msg_t LABEL_NONE = '{valid: 1'b0, ltype: LT_REQ, payload: '0};

  function automatic logic [31:0] label_encode(input label_msg_t m);
    return m.valid ? {m.ltype, m.payload} : IDLE_WORD;
  endfunction

  function automatic label_msg_t label_decode(input logic [31:0] w);
    label_msg_t m;
    m.ltype   = label_type_e'(w[31:28]);
    m.payload = w[27:0];
    m.valid   = (w[31:28] >= 4'h1) && (w[31:28] <= 4'h5);
    return m;
  endfunction

  function automatic label_msg_t make_req(input logic [7:0] dest, input logic [7:0] prio);
    label_msg_t m;
    m.valid = 1'b1; m.ltype = LT_REQ; m.payload = {12'd0, dest, prio};
    return m;
  endfunction

  function automatic label_msg_t make_rsp(input logic [7:0] port);
    label_msg_t m;
    m.valid = 1'b1; m.ltype = LT_RSP; m.payload = {20'd0, port};
    return m;
  endfunction

  // ---------------- Ethernet frame stream ----------------
  // One 32-bit word per beat, big-endian byte order (first byte in [31:24]).
  // last_bytes gives the valid bytes of the eof word (0 means 4).
  typedef struct packed {
    logic [31:0] data;
    logic        sof;
    logic        eof;
    logic [1:0]  last_bytes;
  } frame_beat_t;

  // Frame header inside a data packet: upper half zero, lower half the frame
  // length in bytes. The idle word can never be taken for a header.
  function automatic logic [31:0] frame_header(input logic [15:0] len);
    return {16'd0, len};
  endfunction

  function automatic logic [15:0] words_of(input logic [15:0] len);
    return (len + 16'd3) >> 2;
  endfunction

  // ---------------- CRC-32 ----------------
  // Polynomial 0x04C11DB7, MSB first, one 32-bit word per step, initial value
  // all ones, result inverted.
  localparam logic [31:0] CRC_INIT = 32'hFFFF_FFFF;

  function automatic logic [31:0] crc32_word(input logic [31:0] crc, input logic [31:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 31; i >= 0; i--) begin
      if (c[31] ^ d[i]) c = {c[30:0], 1'b0} ^ 32'h04C1_1DB7;
      else              c = {c[30:0], 1'b0};
    end
    return c;
  endfunction

endpackage
