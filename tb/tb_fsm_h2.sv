// tb_fsm_h2: self-checking testbench for the H-2 coded state machine.
//
// A reference model in this file encodes states as binary plus even parity
// and follows the rule that an upset sends the machine to idle S0. Upsets
// are injected exhaustively (every bit of every state) and at random during
// random start/step traffic. Each cycle the testbench checks the register
// contents, the decoded state, done/busy, and that seu_detected rises in the
// cycle right after each upset. It also checks the property that makes the
// coding safe: the decoded state is only ever the fault-free next state or
// S0, never some other legal state.
module tb_fsm_h2;
  import seu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, step = 1'b0;
  logic [3:0] flip = '0;
  state_e   state;
  logic     busy, done, seu_detected;
  h2_code_t code;

  int checks = 0, failures = 0;
  int upsets = 0, detections = 0, aborts = 0;
  int unsigned ms;          // model state
  logic        bad;         // model: register holds an illegal code

  fsm_h2 dut (.clk, .rst_n, .start, .step, .seu_flip(flip), .state, .busy,
              .done, .seu_detected, .code);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] enc(int unsigned s);
    logic [2:0] b;
    b = 3'(s);
    return {b, b[2] ^ b[1] ^ b[0]};
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic cycle(logic st, logic sp, logic [3:0] f);
    int unsigned nxt;
    @(negedge clk);
    start = st; step = sp; flip = f;
    @(posedge clk);
    if (bad)          nxt = 0;
    else if (ms == 0) nxt = st ? 1 : 0;
    else if (sp)      nxt = (ms + 1) % 8;
    else              nxt = ms;
    if (bad && ms != 0) aborts++;
    ms  = nxt;
    bad = (f != 0);
    #1;
    check(code == (enc(ms) ^ f), $sformatf("code %b expected %b", code, enc(ms) ^ f));
    check(seu_detected == bad, "seu_detected flag");
    if (bad) begin
      check(state == S0 && !busy && !done, "illegal code reads as idle S0");
      upsets++;
      if (seu_detected) detections++;
    end else begin
      check(int'(state) == int'(ms), $sformatf("state %0d expected %0d", state, ms));
      check(done == (ms == 7) && busy == (ms != 0), "done/busy outputs");
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0; start = 0; step = 0; flip = '0;
    @(negedge clk);
    rst_n = 1'b1;
    ms = 0; bad = 0;
  endtask

  initial begin
    // The H-2 codes differ pairwise in at least two bits.
    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++)
        check($countones(enc(i) ^ enc(j)) >= 2, "H-2 distance");
    check(enc(5) == 4'b1010 && enc(7) == 4'b1111 && enc(3) == 4'b0110, "H-2 table");

    for (int s = 0; s < 8; s++) begin
      for (int b = 0; b < 4; b++) begin
        do_reset();
        if (s > 0) cycle(1, 0, '0);
        for (int k = 1; k < s; k++) cycle(0, 1, '0);
        cycle(0, 0, 4'(1) << b);     // upset in state s
        check(seu_detected, "upset detected at once");
        cycle(0, 1, '0);             // machine goes to idle
        check(code == 4'b0000 && state == S0, "back in S0 one clock later");
        cycle(1, 1, '0);             // and can be started again
        check(state == S1, "restart after recovery");
      end
    end

    do_reset();
    for (int n = 0; n < 20000; n++) begin
      logic [3:0] f;
      f = ($urandom % 8 == 0) ? 4'(1) << ($urandom % 4) : '0;
      cycle(1'($urandom % 2), 1'($urandom % 3 != 0), f);
    end

    check(upsets > 1000 && detections == upsets, "every upset detected");
    check(aborts > 0, "some sequences were abandoned to S0");
    $display("upsets=%0d detected=%0d aborted=%0d", upsets, detections, aborts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
