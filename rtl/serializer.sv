// serializer: DATA_W:1 multiplexer serializer (256:1 by default) whose bit
// select is the self-correcting index counter.
//
// A DATA_W-bit word is shifted out one bit per clock, least significant bit
// first, by selecting word bit `index` with a DATA_W:1 multiplexer. The
// index counter (dmr_index_counter) is what makes the serializer resilient:
// an upset in any of its registers is corrected on the next edge, so the
// serial stream never skips or repeats a bit. The multiplexer and the word
// register are datapath and are not protected; a flipped data bit only
// corrupts the current frame.
//
// Interface: pdata is sampled into the word register on the clock edge at
// which index wraps from DATA_W-1 to 0 (load is high in the cycle before
// that edge, so the source can treat it as a ready strobe). sout is
// registered: bit k of a word appears on sout in the cycle after index
// equals k. The seu_flip_* inputs reach the index counter (fault injection;
// tie to zero in a real design).
// Timing: one bit per clock; the first word is taken at the first wrap after
// reset, DATA_W cycles in, and its bit 0 appears one cycle later.
module serializer
  import seu_pkg::*;
#(
  parameter int unsigned DATA_W = 256,
  parameter int unsigned RING_N = 4,
  localparam int unsigned POS_W = (RING_N > 1) ? $clog2(RING_N) : 1,
  localparam int unsigned IDX_W = $clog2(DATA_W),
  localparam int unsigned GC_W  = IDX_W - POS_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] pdata,
  input  logic [RING_N-1:0] seu_flip_ring_a,
  input  logic [RING_N-1:0] seu_flip_ring_b,
  input  logic [GC_W-1:0]   seu_flip_gc1,
  input  logic [GC_W-1:0]   seu_flip_gc2,
  input  logic [1:0]        seu_flip_p,
  output logic              load,
  output logic              sout,
  output logic [IDX_W-1:0]  index,
  output logic [3:0]        err
);

  logic [DATA_W-1:0] word_q;
  logic [GC_W-1:0]   gray;
  logic [RING_N-1:0] ring;

  dmr_index_counter #(.RING_N(RING_N), .GC_W(GC_W)) u_idx (
    .clk             (clk),
    .rst_n           (rst_n),
    .seu_flip_ring_a (seu_flip_ring_a),
    .seu_flip_ring_b (seu_flip_ring_b),
    .seu_flip_gc1    (seu_flip_gc1),
    .seu_flip_gc2    (seu_flip_gc2),
    .seu_flip_p      (seu_flip_p),
    .index           (index),
    .gray            (gray),
    .ring            (ring),
    .last            (load),
    .err             (err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q <= '0;
      sout   <= 1'b0;
    end else begin
      sout <= word_q[index];
      if (load) word_q <= pdata;
    end
  end

endmodule
