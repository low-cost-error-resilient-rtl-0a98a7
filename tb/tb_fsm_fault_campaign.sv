// tb_fsm_fault_campaign: fault-injection campaign comparing the H-2 and H-3
// coded state machines on the same workload.
//
// Both machines run the full S0 -> S1 -> ... -> S7 -> S0 sequence (start
// then seven steps) side by side. In each run one fault is injected into
// each machine's state register at the same point. The campaign covers
// every single-bit fault at every step of the sequence, followed by every
// two-bit fault at every step. Each run is then classified per machine:
//   completed       - the sequence reached S7 and returned to S0 on time
//   abandoned       - the machine went to idle S0 early (detected fault)
//   false positive  - a legal state other than the fault-free one appeared
// Single faults must give zero false positives for both codings, zero
// abandoned runs for H-3, and an abandoned run for H-2 whenever the fault
// lands inside the sequence (S1..S7). Two-bit faults are reported only, since neither
// coding claims to handle them.
module tb_fsm_fault_campaign;
  import seu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, step = 1'b0;
  logic [3:0] f2 = '0;
  logic [5:0] f3 = '0;
  state_e s2, s3;
  logic b2, d2, e2, b3, d3, c3, i3;
  h2_code_t code2;
  h3_code_t code3;

  fsm_h2 u_h2 (.clk, .rst_n, .start, .step, .seu_flip(f2), .state(s2), .busy(b2),
               .done(d2), .seu_detected(e2), .code(code2));
  fsm_h3 u_h3 (.clk, .rst_n, .start, .step, .seu_flip(f3), .state(s3), .busy(b3),
               .done(d3), .seu_corrected(c3), .seu_illegal(i3), .code(code3));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // [0] = single faults, [1] = two-bit faults
  int runs2 [2], runs3 [2], ok2 [2], ab2 [2], fp2 [2], ok3 [2], ab3 [2], fp3 [2];

  initial begin
    #5_000_000;
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

  // One run: start + 7 steps + 1 idle cycle; fault injected on edge `at`.
  task automatic run(int kind, int at, logic [3:0] m2, logic [5:0] m3, bit cnt2, bit cnt3);
    bit abandoned2, abandoned3, wrong2, wrong3;
    int unsigned ref_s;
    abandoned2 = 0; abandoned3 = 0; wrong2 = 0; wrong3 = 0;
    @(negedge clk); rst_n = 1'b0; start = 0; step = 0; f2 = '0; f3 = '0;
    @(negedge clk); rst_n = 1'b1;
    ref_s = 0;
    for (int e = 0; e < 9; e++) begin
      start = (e == 0);
      step  = (e != 0);
      f2 = (e == at) ? m2 : '0;
      f3 = (e == at) ? m3 : '0;
      @(posedge clk);
      ref_s = (e < 8) ? (ref_s + 1) % 8 : 0;
      #1;
      if (int'(s2) != int'(ref_s)) begin
        if (s2 == S0) abandoned2 = 1; else wrong2 = 1;
      end
      if (int'(s3) != int'(ref_s)) begin
        if (s3 == S0) abandoned3 = 1; else wrong3 = 1;
      end
      @(negedge clk);
    end
    if (cnt2) begin
      runs2[kind]++;
      if (wrong2) fp2[kind]++; else if (abandoned2) ab2[kind]++; else ok2[kind]++;
    end
    if (cnt3) begin
      runs3[kind]++;
      if (wrong3) fp3[kind]++; else if (abandoned3) ab3[kind]++; else ok3[kind]++;
    end
  endtask

  initial begin
    for (int k = 0; k < 2; k++) begin
      runs2[k] = 0; runs3[k] = 0; ok2[k] = 0; ab2[k] = 0; fp2[k] = 0; ok3[k] = 0; ab3[k] = 0; fp3[k] = 0;
    end
    // Single faults: every step, every bit of each register.
    for (int at = 0; at < 8; at++)
      for (int b = 0; b < 6; b++)
        run(0, at, (b < 4) ? 4'(1) << b : '0, 6'(1) << b, b < 4, 1'b1);
    // Two-bit faults: every step, every pair of bits of each register.
    for (int at = 0; at < 8; at++)
      for (int b = 0; b < 6; b++)
        for (int c = b + 1; c < 6; c++)
          run(1, at, (c < 4) ? (4'(1) << b) | (4'(1) << c) : '0,
              (6'(1) << b) | (6'(1) << c), c < 4, 1'b1);

    check(runs2[0] == 32 && runs3[0] == 48, "single-fault run count");
    check(fp2[0] == 0, "H-2: no false positives under single faults");
    // Faults landing in S1..S7 (7 edges x 4 bits) abandon the run; a fault on
    // the edge back to idle lands in S0's neighbourhood and is harmless.
    check(ab2[0] == 28 && ok2[0] == 4, "H-2: every fault inside the sequence abandons it");
    check(fp3[0] == 0 && ab3[0] == 0 && ok3[0] == 48, "H-3: every run completes under single faults");
    check(runs2[1] == 48 && runs3[1] == 120, "two-bit run count");
    $display("faults | H-2 runs completed abandoned false+ | H-3 runs completed abandoned false+");
    for (int k = 0; k < 2; k++)
      $display("%0d-bit  |   %4d     %4d      %4d     %4d  |   %4d     %4d      %4d     %4d",
               k + 1, runs2[k], ok2[k], ab2[k], fp2[k], runs3[k], ok3[k], ab3[k], fp3[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
