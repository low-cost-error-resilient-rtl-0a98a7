// dmr_index_counter: self-correcting index counter (8 bits by default) built
// from a high-speed and a low-speed section.
//
// The least significant bits come from a DMR one-hot ring counter of RING_N
// flip-flops (4 flip-flops for 2 bits), which runs at the full clock rate
// with a constant, carry-free delay. The most significant bits come from a
// DMR Gray counter of GC_W bits (6 by default), which is enabled while the
// ring sits at its last position and so advances once per ring revolution,
// at one quarter of the clock rate for a four-bit ring. Both sections
// correct a single event upset in either copy on the next clock edge, so
// the index keeps counting without a reset or a skipped value.
//
// Interface: index is the binary count {gray2bin(gray), ring position};
// gray and ring are the two sections as kept in the registers; last is high
// while index is at its maximum. err is a per-copy error flag
// {gc2, gc1, ring b, ring a}. The seu_flip_* inputs are fault-injection
// ports (tie to zero in a real design).
// Timing: index advances by one every clock, modulo 2**IDX_W; rst_n is
// asynchronous, active low, and sets index to 0.
module dmr_index_counter
  import seu_pkg::*;
#(
  parameter int unsigned RING_N = 4,
  parameter int unsigned GC_W   = 6,
  localparam int unsigned POS_W = (RING_N > 1) ? $clog2(RING_N) : 1,
  localparam int unsigned IDX_W = POS_W + GC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [RING_N-1:0] seu_flip_ring_a,
  input  logic [RING_N-1:0] seu_flip_ring_b,
  input  logic [GC_W-1:0]   seu_flip_gc1,
  input  logic [GC_W-1:0]   seu_flip_gc2,
  input  logic [1:0]        seu_flip_p,
  output logic [IDX_W-1:0]  index,
  output logic [GC_W-1:0]   gray,
  output logic [RING_N-1:0] ring,
  output logic              last,
  output logic [3:0]        err
);

  logic [POS_W-1:0] pos;
  logic             ring_last;

  dmr_ring_counter #(.N(RING_N)) u_ring (
    .clk        (clk),
    .rst_n      (rst_n),
    .seu_flip_a (seu_flip_ring_a),
    .seu_flip_b (seu_flip_ring_b),
    .ring       (ring),
    .pos        (pos),
    .last       (ring_last),
    .err_a      (err[0]),
    .err_b      (err[1])
  );

  dmr_gray_counter #(.W(GC_W)) u_gray (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (ring_last),
    .seu_flip_gc1 (seu_flip_gc1),
    .seu_flip_gc2 (seu_flip_gc2),
    .seu_flip_p   (seu_flip_p),
    .gray         (gray),
    .err1         (err[2]),
    .err2         (err[3])
  );

  assign index = {GC_W'(gray2bin(32'(gray))), pos};
  assign last  = &index;

endmodule
