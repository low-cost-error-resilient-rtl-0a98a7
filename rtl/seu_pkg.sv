// seu_pkg: types, state code tables and helper functions shared by the
// single-event-upset (SEU) resilient control circuits.
//
// State coding (8-state machine, S0..S7):
//   H-2: the 3-bit binary state number followed by an even-parity bit, so
//        every pair of legal codes is at least two bit flips apart.
//   H-3: the six-bit code table below, in which every pair of legal codes is
//        at least three bit flips apart. A code one flip away from a legal
//        code is still decoded as that state.
// Both tables are the ones of the reference state coding; the packing of the
// parity bit as the least significant bit follows that table.
//
// Gray helpers: the index counter keeps its high part as a reflected binary
// Gray code, whose parity alternates on every increment.
package seu_pkg;

  localparam int unsigned NUM_STATES = 8;
  localparam int unsigned BIN_W      = 3;
  localparam int unsigned H2_W       = BIN_W + 1;
  localparam int unsigned H3_W       = 6;

  typedef enum logic [BIN_W-1:0] {
    S0 = 3'd0, S1 = 3'd1, S2 = 3'd2, S3 = 3'd3,
    S4 = 3'd4, S5 = 3'd5, S6 = 3'd6, S7 = 3'd7
  } state_e;

  typedef logic [H2_W-1:0] h2_code_t;
  typedef logic [H3_W-1:0] h3_code_t;

  // Result of decoding a possibly corrupted state register.
  typedef struct packed {
    logic   legal;     // register holds a code that belongs to some state
    logic   exact;     // register holds the exact code of that state
    state_e state;     // decoded state (S0 when not legal)
  } decode_t;

  // H-3 code of each state (minimum pairwise Hamming distance 3).
  function automatic h3_code_t h3_encode(state_e s);
    case (s)
      S0:      return 6'b000000;
      S1:      return 6'b000111;
      S2:      return 6'b011001;
      S3:      return 6'b011110;
      S4:      return 6'b101010;
      S5:      return 6'b101101;
      S6:      return 6'b110011;
      default: return 6'b110100;  // S7
    endcase
  endfunction

  function automatic logic parity(logic [31:0] v);
    return ^v;
  endfunction

  // H-2 code: binary state number with an even-parity bit appended.
  function automatic h2_code_t h2_encode(state_e s);
    return {s, ^s};
  endfunction

  // H-2 decode: a code with odd parity cannot be reached from a legal code
  // except through a bit flip; it is reported as illegal.
  function automatic decode_t h2_decode(h2_code_t c);
    decode_t d;
    d.legal = ~(^c);
    d.exact = d.legal;
    d.state = d.legal ? state_e'(c[H2_W-1:1]) : S0;
    return d;
  endfunction

  function automatic int unsigned popcount6(h3_code_t v);
    int unsigned n = 0;
    for (int i = 0; i < H3_W; i++) n += int'(v[i]);
    return n;
  endfunction

  // H-3 decode: each state owns its code and the six codes adjacent to it.
  // The eight codes that are at distance 2 or more from every legal code
  // are illegal (they need two or more flips).
  function automatic decode_t h3_decode(h3_code_t c);
    decode_t d;
    d.legal = 1'b0;
    d.exact = 1'b0;
    d.state = S0;
    for (int i = 0; i < NUM_STATES; i++) begin
      int unsigned hd;
      hd = popcount6(c ^ h3_encode(state_e'(i)));
      if (hd <= 1) begin
        d.legal = 1'b1;
        d.exact = (hd == 0);
        d.state = state_e'(i);
      end
    end
    return d;
  endfunction

  // Sequence shared by both state machines: S0 is idle; start leaves it for
  // S1; each step moves S1..S6 one state on and S7 back to S0.
  function automatic state_e fsm_next(state_e s, logic start, logic step);
    if (s == S0) return start ? S1 : S0;
    if (!step)   return s;
    return (s == S7) ? S0 : state_e'(s + 3'd1);
  endfunction

  // True when v holds exactly one '1' among its low n bits.
  function automatic logic is_onehot(logic [31:0] v, int unsigned n);
    int unsigned cnt = 0;
    for (int i = 0; i < 32; i++)
      if (i < int'(n)) cnt += int'(v[i]);
    return cnt == 1;
  endfunction

  function automatic logic [31:0] bin2gray(logic [31:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [31:0] gray2bin(logic [31:0] g);
    logic [31:0] b;
    b[31] = g[31];
    for (int i = 30; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
