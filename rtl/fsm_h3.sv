// fsm_h3: eight-state control sequencer with an H-3 coded state register.
//
// The six-bit state register uses a code whose legal values are pairwise at
// least three bit flips apart. Each state owns its own code and the six codes
// one flip away from it, 7 of the 64 register values; no two states share a
// value. A single event upset therefore moves the register to a value that
// still decodes as the same state: outputs are unchanged, the next state is
// computed from the decoded state and written back as a clean code, so the
// sequence continues and completes as if no upset had happened. The
// seu_corrected flag marks a cycle in which the register held such an
// adjacent value. The eight values at distance two or more from every legal
// code need two or more flips; they are flagged on seu_illegal and send the
// machine to idle S0 (this design's choice; the reference covers single
// upsets only).
//
// Sequence (this design's own example control function, identical to
// fsm_h2): S0 is idle, start moves to S1, each step advances S1..S6 by one
// and S7 back to S0.
//
// Interface: state/busy/done are Moore outputs decoded from the register.
// seu_flip inverts the selected register bits as they are loaded (fault
// injection; tie to zero in a real design).
// Timing: one clock per transition; rst_n is asynchronous, active low.
module fsm_h3
  import seu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            step,
  input  logic [H3_W-1:0] seu_flip,
  output state_e          state,
  output logic            busy,
  output logic            done,
  output logic            seu_corrected,
  output logic            seu_illegal,
  output h3_code_t        code
);

  h3_code_t state_q, state_d;
  decode_t  dec;

  always_comb begin
    dec     = h3_decode(state_q);
    state_d = dec.legal ? h3_encode(fsm_next(dec.state, start, step))
                        : h3_encode(S0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= h3_encode(S0);
    else        state_q <= state_d ^ seu_flip;
  end

  assign state         = dec.state;
  assign busy          = dec.state != S0;
  assign done          = dec.state == S7;
  assign seu_corrected = dec.legal & ~dec.exact;
  assign seu_illegal   = ~dec.legal;
  assign code          = state_q;

endmodule
