// dmr_gray_counter: self-correcting Gray code counter in a dual modular
// redundancy (DMR) arrangement, the low-speed section of the index counter.
//
// Two identical W-bit Gray counters, GC1 and GC2, count in parallel. A Gray
// counter changes exactly one bit per increment, so the parity of its value
// alternates between 0 and 1 from one count to the next. Each counter has a
// parity tracker flip-flop (P1, P2) that toggles on every increment and so
// always holds the parity the counter value should have. A single event
// upset in a counter, or in its tracker, breaks that agreement; the pair is
// then reloaded on the next edge from the clone counter and its tracker
// (incremented as well when en is high), so the fault is removed in real
// time without a reset.
//
// Interface: gray is the count taken from whichever counter agrees with its
// tracker; err1/err2 flag a disagreement. en advances the count (driven at
// one quarter of the clock rate by the ring counter in the index counter).
// seu_flip_* invert counter or tracker bits as they are loaded (fault
// injection; tie to zero in a real design).
// Timing: one increment per clock with en high; rst_n is asynchronous,
// active low, and clears both counters and trackers.
module dmr_gray_counter
  import seu_pkg::*;
#(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] seu_flip_gc1,
  input  logic [W-1:0] seu_flip_gc2,
  input  logic [1:0]   seu_flip_p,
  output logic [W-1:0] gray,
  output logic         err1,
  output logic         err2
);

  logic [W-1:0] gc1_q, gc2_q, gc1_src, gc2_src;
  logic         p1_q, p2_q, p1_src, p2_src;
  logic         ok1, ok2;

  function automatic logic [W-1:0] gray_inc(logic [W-1:0] g);
    logic [W-1:0] b;
    b = W'(gray2bin(32'(g))) + 1'b1;   // wraps modulo 2**W
    return W'(bin2gray(32'(b)));
  endfunction

  always_comb begin
    ok1 = (^gc1_q) == p1_q;
    ok2 = (^gc2_q) == p2_q;
    // A counter whose parity broke the alternating pattern copies its clone.
    {gc1_src, p1_src} = (ok1 || !ok2) ? {gc1_q, p1_q} : {gc2_q, p2_q};
    {gc2_src, p2_src} = (ok2 || !ok1) ? {gc2_q, p2_q} : {gc1_q, p1_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gc1_q <= '0;
      gc2_q <= '0;
      p1_q  <= 1'b0;
      p2_q  <= 1'b0;
    end else begin
      gc1_q <= (en ? gray_inc(gc1_src) : gc1_src) ^ seu_flip_gc1;
      gc2_q <= (en ? gray_inc(gc2_src) : gc2_src) ^ seu_flip_gc2;
      p1_q  <= (p1_src ^ en) ^ seu_flip_p[0];
      p2_q  <= (p2_src ^ en) ^ seu_flip_p[1];
    end
  end

  assign gray = ok1 ? gc1_q : gc2_q;
  assign err1 = ~ok1;
  assign err2 = ~ok2;

endmodule
