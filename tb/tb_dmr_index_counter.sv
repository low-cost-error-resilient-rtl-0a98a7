// tb_dmr_index_counter: self-checking testbench for the 8-bit
// self-correcting index counter (4-flip-flop ring for 2 LSBs, 6-bit Gray
// counter for 6 MSBs).
//
// The reference is a plain 8-bit binary counter. The testbench checks that
// the index advances by exactly one every clock, that the Gray section
// changes only while the ring is at its last position (so it runs at one
// quarter of the clock rate and only one of its bits changes per step), and
// that single-bit upsets injected at random into any of the six register
// groups (ring a, ring b, GC1, GC2, P1, P2) never disturb the index.
module tb_dmr_index_counter;
  localparam int unsigned RING_N = 4, GC_W = 6, IDX_W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [RING_N-1:0] fra = '0, frb = '0;
  logic [GC_W-1:0]   fg1 = '0, fg2 = '0;
  logic [1:0]        fp = '0;
  logic [IDX_W-1:0]  index;
  logic [GC_W-1:0]   gray, gray_prev;
  logic [RING_N-1:0] ring;
  logic              last;
  logic [3:0]        err;

  int checks = 0, failures = 0, upsets = 0, gray_steps = 0, wraps = 0;
  int err_seen [4] = '{0, 0, 0, 0};
  logic [IDX_W-1:0] cnt;

  dmr_index_counter #(.RING_N(RING_N), .GC_W(GC_W)) dut (
    .clk, .rst_n, .seu_flip_ring_a(fra), .seu_flip_ring_b(frb),
    .seu_flip_gc1(fg1), .seu_flip_gc2(fg2), .seu_flip_p(fp),
    .index, .gray, .ring, .last, .err);

  always #5 clk = ~clk;

  initial begin
    #3_000_000;
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

  initial begin
    @(negedge clk); rst_n = 1'b1; cnt = '0;
    #1 check(index == 0, "reset index");
    for (int n = 0; n < 60000; n++) begin
      logic [7:0] f;
      f = 8'(1) << ($urandom % 8);
      {fra, frb, fg1, fg2, fp} = '0;
      if ($urandom % 3 == 0) begin
        upsets++;
        case ($urandom % 6)
          0: fra = f[RING_N-1:0];
          1: frb = f[RING_N-1:0];
          2: fg1 = f[GC_W-1:0];
          3: fg2 = f[GC_W-1:0];
          4: fp  = f[1:0];
          default: fp = 2'(1) << ($urandom % 2);
        endcase
        if (fra == 0 && frb == 0 && fg1 == 0 && fg2 == 0 && fp == 0) upsets--;
      end
      gray_prev = gray;
      @(posedge clk);
      cnt = cnt + 1'b1;
      #1;
      check(index == cnt, $sformatf("index %0d expected %0d", index, cnt));
      check(ring == RING_N'(1) << cnt[1:0], "ring section");
      check(last == (cnt == '1), "last flag");
      if (gray != gray_prev) begin
        gray_steps++;
        check(cnt[1:0] == 2'b00, "Gray section moves once per ring revolution");
        check($countones(gray ^ gray_prev) == 1, "one Gray bit changes");
      end
      for (int i = 0; i < 4; i++) if (err[i]) err_seen[i]++;
      if (cnt == 0) wraps++;
      @(negedge clk);
    end
    check(gray_steps == 60000 / 4, "Gray section at one quarter rate");
    check(wraps == 60000 / 256, "index wrapped");
    for (int i = 0; i < 4; i++) check(err_seen[i] > 100, $sformatf("err[%0d] exercised", i));
    $display("upsets=%0d gray_steps=%0d wraps=%0d", upsets, gray_steps, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
