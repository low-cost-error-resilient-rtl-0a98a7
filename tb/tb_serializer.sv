// tb_serializer: self-checking testbench for the 256:1 serializer with its
// self-correcting index counter.
//
// The testbench offers a new random 256-bit word every time load is high,
// then reassembles the serial output with its own bit counter (it does not
// look at the DUT's index) and compares each received word with the one
// sent. Single-bit upsets are injected at random into the index counter
// registers throughout; the stream must stay exact. It checks that load
// comes exactly every 256 clocks and that bit 0 of a word appears one clock
// after the word is taken.
module tb_serializer;
  localparam int unsigned DATA_W = 256, RING_N = 4, GC_W = 6;
  localparam int unsigned FRAMES = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [DATA_W-1:0] pdata = '0;
  logic [RING_N-1:0] fra = '0, frb = '0;
  logic [GC_W-1:0]   fg1 = '0, fg2 = '0;
  logic [1:0]        fp = '0;
  logic              load, sout;
  logic [7:0]        index;
  logic [3:0]        err;

  logic [DATA_W-1:0] sent [FRAMES + 1];
  logic [DATA_W-1:0] rx;
  int checks = 0, failures = 0, upsets = 0, frames_ok = 0;
  int cyc = 0, last_load = -1, nsent = 0, bitpos = -1, nrx = 0;

  serializer #(.DATA_W(DATA_W), .RING_N(RING_N)) dut (
    .clk, .rst_n, .pdata, .seu_flip_ring_a(fra), .seu_flip_ring_b(frb),
    .seu_flip_gc1(fg1), .seu_flip_gc2(fg2), .seu_flip_p(fp),
    .load, .sout, .index, .err);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic logic [DATA_W-1:0] rand_word();
    logic [DATA_W-1:0] w;
    for (int i = 0; i < int'(DATA_W) / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    bit took;
    @(negedge clk); rst_n = 1'b1;
    sent[0] = rand_word();
    pdata   = sent[0];
    while (nrx < int'(FRAMES)) begin
      {fra, frb, fg1, fg2, fp} = '0;
      if ($urandom % 4 == 0) begin
        upsets++;
        case ($urandom % 5)
          0: fra = RING_N'(1) << ($urandom % RING_N);
          1: frb = RING_N'(1) << ($urandom % RING_N);
          2: fg1 = GC_W'(1) << ($urandom % GC_W);
          3: fg2 = GC_W'(1) << ($urandom % GC_W);
          default: fp = 2'(1) << ($urandom % 2);
        endcase
      end
      took = load;
      @(posedge clk);
      cyc++;
      #1;
      // Reassemble: the bit after a capture is bit 0 of the captured word.
      if (bitpos >= 0) begin
        rx[bitpos] = sout;
        bitpos++;
        if (bitpos == int'(DATA_W)) begin
          check(rx == sent[nrx], $sformatf("frame %0d received intact", nrx));
          if (rx == sent[nrx]) frames_ok++;
          nrx++;
          bitpos = 0;
        end
      end
      if (took) begin
        if (last_load >= 0) check(cyc - last_load == int'(DATA_W), "load period");
        else                check(cyc == int'(DATA_W), "first capture after one frame");
        last_load = cyc;
        if (bitpos < 0) bitpos = 0;
        nsent++;
        if (nsent <= int'(FRAMES)) sent[nsent] = rand_word();
        pdata = sent[nsent > int'(FRAMES) ? FRAMES : nsent];
      end
      @(negedge clk);
    end
    check(frames_ok == int'(FRAMES), "all frames intact");
    check(upsets > 1000, "upsets injected");
    $display("frames=%0d upsets=%0d", frames_ok, upsets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
