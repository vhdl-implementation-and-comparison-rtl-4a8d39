// tb_ripple_subtractor: self-checking test of the ripple-carry subtractor.
//
// The 8-bit subtractor (the width used for the real part) is checked on
// every operand pair: diff must be (a - b) modulo 256 and no_borrow must be
// 1 exactly when a >= b. A 12-bit instance is checked on random operands.
// One operand pair per clock.
module tb_ripple_subtractor;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, d8;    logic nb8;
  logic [11:0] a12, b12, d12; logic nb12;

  ripple_subtractor #(.W(8))  dut8  (.a(a8),  .b(b8),  .diff(d8),  .no_borrow(nb8));
  ripple_subtractor #(.W(12)) dut12 (.a(a12), .b(b12), .diff(d12), .no_borrow(nb12));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    a8 = '0; b8 = '0; a12 = '0; b12 = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        @(posedge clk);
        a8 = 8'(i); b8 = 8'(j);
        a12 = 12'($urandom); b12 = 12'($urandom);
        @(negedge clk);
        check("diff8",  d8,  (i - j) & 255);
        check("nb8",    nb8, (i >= j) ? 1 : 0);
        check("diff12", d12, (longint'(a12) - b12) & 4095);
        check("nb12",   nb12, (a12 >= b12) ? 1 : 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
