// tb_seu_resilient_top: end-to-end testbench of the whole design at its
// default size (256:1 serializer, 8-bit index counter, both state machines).
//
// All three control paths run at once under random traffic while single-bit
// upsets are injected at random into every protected register group. The
// testbench keeps its own reference for each path:
//   - H-3 machine: the fault-free state sequence; the outputs must never
//     deviate from it.
//   - H-2 machine: the sequence with the rule that an upset sends it to S0;
//     the outputs must never show a state other than that.
//   - serializer: the words offered on load, reassembled from sout with the
//     testbench's own bit counter; every frame must arrive intact.
// It counts each mechanism (H-2 detection and abandoned sequences, H-3
// correction and completed sequences, ring a/b, GC1/GC2 and parity-tracker
// corrections, serializer loads, index wraps) and fails any that never
// happened.
module tb_seu_resilient_top;
  import seu_pkg::*;

  localparam int unsigned DATA_W = 256, FRAMES = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic h2_start = 0, h2_step = 0, h3_start = 0, h3_step = 0;
  logic [3:0] h2_flip = '0;
  logic [5:0] h3_flip = '0;
  state_e h2_state, h3_state;
  logic h2_busy, h2_done, h2_seu_detected, h3_busy, h3_done, h3_seu_corrected, h3_seu_illegal;
  h2_code_t h2_code;
  h3_code_t h3_code;
  logic [DATA_W-1:0] pdata = '0;
  logic [3:0] fra = '0, frb = '0;
  logic [5:0] fg1 = '0, fg2 = '0;
  logic [1:0] fp = '0;
  logic ser_load, ser_sout;
  logic [7:0] ser_index;
  logic [3:0] ser_err;

  seu_resilient_top dut (
    .clk, .rst_n,
    .h2_start, .h2_step, .h2_seu_flip(h2_flip), .h2_state, .h2_busy, .h2_done,
    .h2_seu_detected, .h2_code,
    .h3_start, .h3_step, .h3_seu_flip(h3_flip), .h3_state, .h3_busy, .h3_done,
    .h3_seu_corrected, .h3_seu_illegal, .h3_code,
    .ser_pdata(pdata), .ser_seu_flip_ring_a(fra), .ser_seu_flip_ring_b(frb),
    .ser_seu_flip_gc1(fg1), .ser_seu_flip_gc2(fg2), .ser_seu_flip_p(fp),
    .ser_load, .ser_sout, .ser_index, .ser_err);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_h2_detect = 0, n_h2_abort = 0, n_h2_done = 0;
  int n_h3_correct = 0, n_h3_done = 0;
  int n_err [4] = '{0, 0, 0, 0};
  int n_load = 0, n_wrap = 0;

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

  function automatic int unsigned seq_next(int unsigned s, logic st, logic sp);
    if (s == 0) return st ? 1 : 0;
    if (!sp) return s;
    return (s + 1) % 8;
  endfunction

  function automatic logic [DATA_W-1:0] rand_word();
    logic [DATA_W-1:0] w;
    for (int i = 0; i < int'(DATA_W) / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  int unsigned m2, m3;
  logic        bad2;
  logic [DATA_W-1:0] sent [FRAMES + 1];
  logic [DATA_W-1:0] rx;
  int nsent = 0, nrx = 0, bitpos = -1, cyc = 0, last_load = -1;

  initial begin
    bit took;
    @(negedge clk); rst_n = 1'b1;
    m2 = 0; m3 = 0; bad2 = 0;
    sent[0] = rand_word();
    pdata   = sent[0];
    while (nrx < int'(FRAMES)) begin
      // stimulus
      h2_start = 1'($urandom % 2); h2_step = 1'($urandom % 4 != 0);
      h3_start = 1'($urandom % 2); h3_step = 1'($urandom % 4 != 0);
      h2_flip  = ($urandom % 16 == 0) ? 4'(1) << ($urandom % 4) : '0;
      h3_flip  = ($urandom % 4 == 0)  ? 6'(1) << ($urandom % 6) : '0;
      {fra, frb, fg1, fg2, fp} = '0;
      if ($urandom % 4 == 0)
        case ($urandom % 5)
          0: fra = 4'(1) << ($urandom % 4);
          1: frb = 4'(1) << ($urandom % 4);
          2: fg1 = 6'(1) << ($urandom % 6);
          3: fg2 = 6'(1) << ($urandom % 6);
          default: fp = 2'(1) << ($urandom % 2);
        endcase
      took = ser_load;
      @(posedge clk);
      cyc++;
      // reference models
      if (bad2 && m2 != 0) n_h2_abort++;
      m2   = bad2 ? 0 : seq_next(m2, h2_start, h2_step);
      bad2 = (h2_flip != 0);
      m3   = seq_next(m3, h3_start, h3_step);
      #1;
      // H-2
      check(h2_seu_detected == bad2, "H-2 detection");
      if (bad2) begin
        check(h2_state == S0, "H-2 upset reads as idle");
        n_h2_detect++;
      end else begin
        check(int'(h2_state) == int'(m2), "H-2 state");
        if (h2_done) n_h2_done++;
      end
      // H-3
      check(int'(h3_state) == int'(m3), "H-3 state follows fault-free run");
      check(h3_seu_corrected == (h3_flip != 0) && !h3_seu_illegal, "H-3 flags");
      if (h3_seu_corrected) n_h3_correct++;
      if (h3_done && h3_step) n_h3_done++;
      // serializer and its index counter
      for (int i = 0; i < 4; i++) if (ser_err[i]) n_err[i]++;
      if (ser_index == 0) n_wrap++;
      if (bitpos >= 0) begin
        rx[bitpos] = ser_sout;
        bitpos++;
        if (bitpos == int'(DATA_W)) begin
          check(rx == sent[nrx], $sformatf("frame %0d intact", nrx));
          nrx++;
          bitpos = 0;
        end
      end
      if (took) begin
        n_load++;
        if (last_load >= 0) check(cyc - last_load == int'(DATA_W), "load period");
        last_load = cyc;
        if (bitpos < 0) bitpos = 0;
        nsent++;
        if (nsent <= int'(FRAMES)) sent[nsent] = rand_word();
        pdata = sent[nsent > int'(FRAMES) ? FRAMES : nsent];
      end
      @(negedge clk);
    end

    check(n_h2_detect > 0, "H-2 upset detection happened");
    check(n_h2_abort > 0, "H-2 sequence abandoned to S0 happened");
    check(n_h2_done > 0, "H-2 sequence completed");
    check(n_h3_correct > 0, "H-3 correction happened");
    check(n_h3_done > 0, "H-3 sequence completed");
    check(n_err[0] > 0 && n_err[1] > 0, "ring a and ring b corrections happened");
    check(n_err[2] > 0 && n_err[3] > 0, "GC1 and GC2 corrections happened");
    check(n_load > 0 && n_wrap > 0, "serializer loads and index wraps happened");
    $display("h2: detect=%0d abort=%0d done=%0d | h3: corrected=%0d done=%0d",
             n_h2_detect, n_h2_abort, n_h2_done, n_h3_correct, n_h3_done);
    $display("index counter: ring a=%0d ring b=%0d gc1=%0d gc2=%0d | loads=%0d wraps=%0d",
             n_err[0], n_err[1], n_err[2], n_err[3], n_load, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
