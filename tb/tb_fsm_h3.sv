// tb_fsm_h3: self-checking testbench for the H-3 coded state machine.
//
// A reference model in this file tracks the fault-free state sequence from
// its own copy of the H-3 code table. Because a single upset must be
// invisible at the outputs, the DUT's decoded state is compared with the
// fault-free model every cycle, while upsets are injected: (1) exhaustively,
// every bit of every state, and (2) at random during random start/step
// traffic. It also checks that the register holds the exact code again one
// clock after each upset, that seu_corrected flags exactly the upset cycles,
// that every started sequence reaches done, and that the code table has a
// minimum Hamming distance of 3.
module tb_fsm_h3;
  import seu_pkg::*;

  localparam logic [5:0] CODE [8] = '{6'b000000, 6'b000111, 6'b011001,
                                      6'b011110, 6'b101010, 6'b101101,
                                      6'b110011, 6'b110100};

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, step = 1'b0;
  logic [5:0] flip = '0;
  state_e   state;
  logic     busy, done, seu_corrected, seu_illegal;
  h3_code_t code;

  int checks = 0, failures = 0;
  int upsets = 0, corrections = 0, dones = 0, starts = 0;
  int unsigned ms;        // model state (fault free)
  logic        flipped;   // an upset was injected at the last edge

  fsm_h3 dut (.clk, .rst_n, .start, .step, .seu_flip(flip), .state, .busy,
              .done, .seu_corrected, .seu_illegal, .code);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ham(logic [5:0] a, logic [5:0] b);
    int unsigned n = 0;
    for (int i = 0; i < 6; i++) n += (a[i] != b[i]) ? 1 : 0;
    return n;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // One clock: drive at the falling edge, update the model at the rising
  // edge, check just after it.
  task automatic cycle(logic st, logic sp, logic [5:0] f);
    @(negedge clk);
    start = st; step = sp; flip = f;
    @(posedge clk);
    if (ms == 0) begin
      if (st) begin ms = 1; starts++; end
    end else if (sp) ms = (ms + 1) % 8;
    flipped = (f != 0);
    #1;
    check(int'(state) == int'(ms), $sformatf("state %0d expected %0d", state, ms));
    check(code == (CODE[ms] ^ f), $sformatf("code %b expected %b", code, CODE[ms] ^ f));
    check(seu_corrected == flipped, "seu_corrected flag");
    check(!seu_illegal, "no illegal code after a single upset");
    check(done == (ms == 7) && busy == (ms != 0), "done/busy outputs");
    if (flipped) upsets++;
    if (seu_corrected) corrections++;
    if (done && !flipped) dones++;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0; start = 0; step = 0; flip = '0;
    @(negedge clk);
    rst_n = 1'b1;
    ms = 0;
  endtask

  initial begin
    // Code table: minimum distance 3.
    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++)
        check(ham(CODE[i], CODE[j]) >= 3, $sformatf("distance S%0d-S%0d", i, j));

    // Exhaustive: every state, every bit, upset while the state is held.
    for (int s = 0; s < 8; s++) begin
      for (int b = 0; b < 6; b++) begin
        do_reset();
        if (s > 0) cycle(1, 0, '0);
        for (int k = 1; k < s; k++) cycle(0, 1, '0);
        cycle(0, 0, 6'(1) << b);     // upset lands in state s
        cycle(0, 0, '0);             // corrected on this edge
        check(code == CODE[s], "register rewritten with the clean code");
        // Finish the sequence: it must complete normally.
        if (s > 0) while (ms != 0) cycle(0, 1, '0);
      end
    end

    // Upset during a transition: the next state is still taken correctly.
    do_reset();
    cycle(1, 0, 6'b000100);          // S0 -> S1 with bit 2 hit
    cycle(0, 1, 6'b100000);          // S1 -> S2 with bit 5 hit
    cycle(0, 1, '0);                 // S2 -> S3
    check(ms == 3 && code == CODE[3], "sequence continues after upsets");

    // Random traffic with random single-bit upsets.
    do_reset();
    for (int n = 0; n < 20000; n++) begin
      logic [5:0] f;
      f = ($urandom % 4 == 0) ? 6'(1) << ($urandom % 6) : '0;
      cycle(1'($urandom % 2), 1'($urandom % 3 != 0), f);
    end
    while (ms != 0) cycle(0, 1, '0);

    check(upsets > 1000, "enough upsets injected");
    check(corrections == upsets, "every upset corrected");
    check(dones >= starts - 100, "started sequences reach done");
    $display("upsets=%0d corrected=%0d starts=%0d", upsets, corrections, starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
