// tb_dmr_gray_counter: self-checking testbench for the DMR Gray counter.
//
// The reference is a binary count converted to Gray code in this file.
// The count is advanced by a random enable; single-bit upsets are injected
// into GC1, GC2 or one of the two parity trackers, exhaustively at first and
// then at random. Each cycle the testbench checks the corrected output
// against the fault-free count, that the error flag of the hit copy rises in
// the cycle after the upset, and (one clock later) that both counters and
// both trackers agree again. It also checks the first eight codes and their
// alternating parity against the published table.
module tb_dmr_gray_counter;
  localparam int unsigned W = 6;
  localparam logic [5:0] FIRST8 [8] = '{6'b000000, 6'b000001, 6'b000011,
                                        6'b000010, 6'b000110, 6'b000111,
                                        6'b000101, 6'b000100};

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] f1 = '0, f2 = '0;
  logic [1:0]   fp = '0;
  logic [W-1:0] gray;
  logic         err1, err2;

  int checks = 0, failures = 0, hits1 = 0, hits2 = 0, hitsp = 0, wraps = 0;
  logic [W-1:0] cnt;

  dmr_gray_counter #(.W(W)) dut (.clk, .rst_n, .en, .seu_flip_gc1(f1),
                                 .seu_flip_gc2(f2), .seu_flip_p(fp),
                                 .gray, .err1, .err2);

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

  // Starts and ends just after a falling edge.
  task automatic cycle(logic e, logic [W-1:0] a, logic [W-1:0] b, logic [1:0] p);
    en = e; f1 = a; f2 = b; fp = p;
    @(posedge clk);
    if (e) cnt = cnt + 1'b1;
    #1;
    check(gray == (cnt ^ (cnt >> 1)), $sformatf("gray %b count %0d", gray, cnt));
    check(err1 == (a != 0 || p[0]) && err2 == (b != 0 || p[1]), "error flags");
    if (a != 0) hits1++;
    if (b != 0) hits2++;
    if (p != 0) hitsp++;
    if (e && cnt == 0) wraps++;
    @(negedge clk);
  endtask

  task automatic settled();
    check(dut.gc1_q == dut.gc2_q && dut.p1_q == dut.p2_q && dut.gc1_q == (cnt ^ (cnt >> 1))
          && dut.p1_q == ^dut.gc1_q, "both copies agree again");
  endtask

  initial begin
    @(negedge clk); rst_n = 1'b1; cnt = '0;
    for (int i = 0; i < 8; i++) begin
      check(gray == FIRST8[i], $sformatf("table code %0d", i));
      check(^gray == 1'(i % 2), "parity alternates");
      cycle(1, '0, '0, '0);
    end

    for (int b = 0; b < int'(W); b++) begin
      cycle(b % 2 == 0, W'(1) << b, '0, '0); cycle(1, '0, '0, '0); settled();
      cycle(b % 2 == 1, '0, W'(1) << b, '0); cycle(0, '0, '0, '0); settled();
    end
    cycle(1, '0, '0, 2'b01); cycle(1, '0, '0, '0); settled();
    cycle(0, '0, '0, 2'b10); cycle(1, '0, '0, '0); settled();

    for (int n = 0; n < 20000; n++) begin
      logic [W-1:0] f;
      int sel;
      f = W'(1) << ($urandom % W);
      sel = int'($urandom % 8);
      case (sel)
        0: cycle(1'($urandom % 2), f, '0, '0);
        1: cycle(1'($urandom % 2), '0, f, '0);
        2: cycle(1'($urandom % 2), '0, '0, 2'(1) << ($urandom % 2));
        default: cycle(1'($urandom % 4 != 0), '0, '0, '0);
      endcase
    end
    cycle(1, '0, '0, '0); settled();

    check(hits1 > 100 && hits2 > 100 && hitsp > 100, "all copies hit");
    check(wraps > 10, "counter wrapped");
    $display("hits gc1=%0d gc2=%0d parity=%0d wraps=%0d", hits1, hits2, hitsp, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
