// dmr_ring_counter: self-correcting one-hot ring counter in a dual modular
// redundancy (DMR) arrangement, the high-speed section of the index counter.
//
// Two N-bit ring counters, the main ring a and its shadow b, rotate a single
// '1' in lock step every clock; N flip-flops give a count modulo N with a
// propagation delay that does not grow with N (no carry chain). Each ring is
// checked every cycle for its defining property, exactly one '1'. After a
// single event upset the hit ring holds either no '1' or two of them; the
// check flags it and, on the same clock edge, the hit ring is loaded with the
// rotated contents of its clone instead of its own. Counting continues
// without a reset or a lost cycle. The check is an XOR (parity) tree over
// the ring, as in the reference: a legal ring has odd parity and one flip
// always makes it even. The extra logic in the loop is that XOR and a 2:1
// multiplexer per bit.
//
// Interface: ring is the one-hot count (taken from whichever ring is legal),
// pos its binary value, last is high while the count is N-1 (the ring wraps
// on the next edge). err_a/err_b flag the cycle in which a ring is illegal.
// seu_flip_a/b invert ring bits as they are loaded (fault injection; tie to
// zero in a real design). Upsets in both rings in the same cycle are outside
// what DMR can correct.
// Timing: advances every clock; rst_n is asynchronous, active low, and puts
// both rings at count 0.
module dmr_ring_counter
  import seu_pkg::*;
#(
  parameter int unsigned N     = 4,
  localparam int unsigned POS_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     seu_flip_a,
  input  logic [N-1:0]     seu_flip_b,
  output logic [N-1:0]     ring,
  output logic [POS_W-1:0] pos,
  output logic             last,
  output logic             err_a,
  output logic             err_b
);

  logic [N-1:0] a_q, b_q, a_src, b_src;
  logic         ok_a, ok_b;

  always_comb begin
    // One '1' means odd parity; a single flip leaves zero or two '1's.
    ok_a  = ^a_q;
    ok_b  = ^b_q;
    // An illegal ring takes its next value from the clone.
    a_src = (ok_a || !ok_b) ? a_q : b_q;
    b_src = (ok_b || !ok_a) ? b_q : a_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= N'(1);
      b_q <= N'(1);
    end else begin
      a_q <= {a_src[N-2:0], a_src[N-1]} ^ seu_flip_a;
      b_q <= {b_src[N-2:0], b_src[N-1]} ^ seu_flip_b;
    end
  end

  always_comb begin
    ring = ok_a ? a_q : b_q;
    pos  = '0;
    for (int i = 0; i < int'(N); i++)
      if (ring[i]) pos = POS_W'(i);
  end

  assign last  = ring[N-1];
  assign err_a = ~ok_a;
  assign err_b = ~ok_b;

endmodule
