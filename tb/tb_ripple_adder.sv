// tb_ripple_adder: self-checking test of the ripple-carry adder.
//
// The 8-bit adder (the width used for the imaginary part) is checked on
// every operand pair with both carry-in values: {cout, sum} must equal
// a + b + cin. A 16-bit instance is checked on random operands. One
// operand set per clock.
module tb_ripple_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;    logic ci8, co8;
  logic [15:0] a16, b16, s16; logic ci16, co16;

  ripple_adder #(.W(8))  dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  ripple_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    a8 = '0; b8 = '0; ci8 = 1'b0; a16 = '0; b16 = '0; ci16 = 1'b0;
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          @(posedge clk);
          a8 = 8'(i); b8 = 8'(j); ci8 = 1'(c);
          a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
          @(negedge clk);
          check("W=8",  {co8, s8},   i + j + c);
          check("W=16", {co16, s16}, longint'(a16) + b16 + ci16);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (140000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
