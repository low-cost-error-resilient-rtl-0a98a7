// tb_dmr_ring_counter: self-checking testbench for the DMR ring counter.
//
// The reference is a plain modulo-N count. Single-bit upsets are injected
// into the main or the shadow ring, exhaustively (every position, every
// bit, each ring) and then at random. Each cycle the testbench checks that
// the corrected one-hot output, its binary position and the wrap flag follow
// the fault-free count with no lost or extra cycle, that the error flag of
// the hit ring rises exactly in the cycle after the upset, and that both
// rings hold the legal value again one clock later. It also checks the
// counting argument that a 4-bit ring has 4 legal and 12 illegal states.
module tb_dmr_ring_counter;
  import seu_pkg::*;

  localparam int unsigned N = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] fa = '0, fb = '0;
  logic [N-1:0] ring;
  logic [1:0]   pos;
  logic         last, err_a, err_b;

  int checks = 0, failures = 0, hits_a = 0, hits_b = 0, wraps = 0;
  int unsigned cnt;

  dmr_ring_counter #(.N(N)) dut (.clk, .rst_n, .seu_flip_a(fa), .seu_flip_b(fb),
                                 .ring, .pos, .last, .err_a, .err_b);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
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

  task automatic cycle(logic [N-1:0] a, logic [N-1:0] b);
    fa = a; fb = b;
    @(posedge clk);
    cnt = (cnt + 1) % N;
    #1;
    check(ring == N'(1) << cnt, $sformatf("ring %b count %0d", ring, cnt));
    check(pos == 2'(cnt) && last == (cnt == N - 1), "position/last");
    check(err_a == (a != 0) && err_b == (b != 0), "error flags");
    if (cnt == 0) wraps++;
    @(negedge clk);
  endtask

  initial begin
    int legal;
    legal = 0;
    for (int v = 0; v < 16; v++) legal += (is_onehot(32'(v), 4)) ? 1 : 0;
    check(legal == 4, "4 legal states of 16");

    @(negedge clk); rst_n = 1'b1; cnt = 0;
    #1 check(ring == 4'b0001 && pos == 0, "reset value");

    for (int p = 0; p < int'(N); p++)
      for (int b = 0; b < int'(N); b++)
        for (int side = 0; side < 2; side++) begin
          cycle(side == 0 ? N'(1) << b : '0, side == 1 ? N'(1) << b : '0);
          cycle('0, '0);
          check(dut.a_q == dut.b_q && dut.a_q == N'(1) << cnt, "rings realigned");
          if (side == 0) hits_a++; else hits_b++;
          for (int k = 0; k < p; k++) cycle('0, '0);
        end

    for (int n = 0; n < 20000; n++) begin
      logic [N-1:0] f;
      f = ($urandom % 3 == 0) ? N'(1) << ($urandom % N) : '0;
      if ($urandom % 2 == 0) begin cycle(f, '0); if (f != 0) hits_a++; end
      else                   begin cycle('0, f); if (f != 0) hits_b++; end
    end

    check(hits_a > 100 && hits_b > 100, "both rings hit");
    check(wraps > 1000, "counter wrapped");
    $display("hits_a=%0d hits_b=%0d wraps=%0d", hits_a, hits_b, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
