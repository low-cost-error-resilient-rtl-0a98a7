// fsm_h2: eight-state control sequencer with an H-2 coded state register.
//
// The state register holds the binary state number plus an even-parity bit
// (4 flip-flops for 8 states), so any two legal codes differ in at least two
// bits. A single event upset (one flipped register bit) therefore always
// lands on an odd-parity code, which no legal state uses. Such a code is
// decoded as idle S0 for the outputs, flagged on seu_detected, and the next
// clock edge loads S0: no wrong state is ever entered and no wrong output is
// produced, but the interrupted sequence is abandoned.
//
// Sequence (this design's own example control function; the reference only
// fixes the coding): S0 is idle, start moves to S1, each step advances
// S1..S6 by one and S7 back to S0.
//
// Interface: state/busy/done are Moore outputs decoded from the register.
// seu_flip is a fault-injection input: bit i set inverts register bit i as
// it is loaded on that clock edge, which has the same effect as an upset
// right after the edge. Tie it to zero in a real design.
// Timing: one clock per transition; rst_n is asynchronous, active low.
module fsm_h2
  import seu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            step,
  input  logic [H2_W-1:0] seu_flip,
  output state_e          state,
  output logic            busy,
  output logic            done,
  output logic            seu_detected,
  output h2_code_t        code
);

  h2_code_t state_q, state_d;
  decode_t  dec;

  always_comb begin
    dec = h2_decode(state_q);
    // An illegal (odd-parity) code returns the machine to idle.
    state_d = dec.legal ? h2_encode(fsm_next(dec.state, start, step))
                        : h2_encode(S0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= h2_encode(S0);
    else        state_q <= state_d ^ seu_flip;
  end

  assign state        = dec.state;
  assign busy         = dec.state != S0;
  assign done         = dec.state == S7;
  assign seu_detected = ~dec.legal;
  assign code         = state_q;

endmodule
