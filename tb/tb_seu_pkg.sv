// tb_seu_pkg: self-checking testbench for the shared package functions.
//
// Checks the H-2 and H-3 code tables against the published state coding,
// decodes all 16 H-2 and all 64 H-3 register values against a brute-force
// nearest-code search written here, checks that exactly 56 H-3 values are
// owned by a state (8 states x 7 values), checks the Gray conversions
// against the published first eight codes and by round trip, and checks the
// one-hot test and the sequencing function.
module tb_seu_pkg;
  import seu_pkg::*;

  localparam logic [5:0] H3 [8] = '{6'b000000, 6'b000111, 6'b011001,
                                    6'b011110, 6'b101010, 6'b101101,
                                    6'b110011, 6'b110100};
  localparam logic [3:0] H2 [8] = '{4'b0000, 4'b0011, 4'b0101, 4'b0110,
                                    4'b1001, 4'b1010, 4'b1100, 4'b1111};
  localparam logic [5:0] G8 [8] = '{6'b000000, 6'b000001, 6'b000011,
                                    6'b000010, 6'b000110, 6'b000111,
                                    6'b000101, 6'b000100};

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    decode_t d;
    int owned;
    owned = 0;
    for (int s = 0; s < 8; s++) begin
      check(h3_encode(state_e'(s)) == H3[s], $sformatf("H-3 code S%0d", s));
      check(h2_encode(state_e'(s)) == H2[s], $sformatf("H-2 code S%0d", s));
    end
    for (int v = 0; v < 64; v++) begin
      int best, bd;
      best = -1;
      bd   = 99;
      for (int s = 0; s < 8; s++)
        if ($countones(6'(v) ^ H3[s]) < bd) begin bd = $countones(6'(v) ^ H3[s]); best = s; end
      d = h3_decode(6'(v));
      check(d.legal == (bd <= 1), $sformatf("H-3 legal %0d", v));
      check(d.exact == (bd == 0), $sformatf("H-3 exact %0d", v));
      if (bd <= 1) begin
        owned++;
        check(int'(d.state) == best, $sformatf("H-3 state of %b", 6'(v)));
      end else check(d.state == S0, "illegal H-3 reads S0");
    end
    check(owned == 56, "56 owned H-3 values");
    for (int v = 0; v < 16; v++) begin
      d = h2_decode(4'(v));
      check(d.legal == ($countones(4'(v)) % 2 == 0), "H-2 parity rule");
      if (d.legal) check(H2[d.state] == 4'(v), "H-2 state");
      else         check(d.state == S0, "illegal H-2 reads S0");
    end
    for (int i = 0; i < 8; i++) check(6'(bin2gray(32'(i))) == G8[i], "Gray table");
    for (int i = 0; i < 256; i++) begin
      check(gray2bin(bin2gray(32'(i))) == 32'(i), "Gray round trip");
      if (i > 0) check($countones(bin2gray(32'(i)) ^ bin2gray(32'(i - 1))) == 1, "Gray unit step");
      check(^bin2gray(32'(i)) == 1'(i % 2), "Gray parity alternates");
    end
    for (int v = 0; v < 16; v++) check(is_onehot(32'(v), 4) == ($countones(4'(v)) == 1), "one-hot test");
    check(fsm_next(S0, 0, 1) == S0 && fsm_next(S0, 1, 0) == S1, "idle/start");
    check(fsm_next(S3, 0, 0) == S3 && fsm_next(S3, 1, 1) == S4, "hold/step");
    check(fsm_next(S7, 0, 1) == S0, "S7 returns to S0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
