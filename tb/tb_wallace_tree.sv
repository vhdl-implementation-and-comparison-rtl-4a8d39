// tb_wallace_tree: self-checking test of the carry-save reduction tree.
//
// Random rows are fed to trees of 2, 3 (the size used by the 4-bit Booth
// multiplier), 5 and 9 rows. The two output rows must add up, modulo 2^W,
// to the sum of the input rows; for the 3-row tree the sum row must also be
// the bitwise XOR and the carry row the shifted majority of the inputs (one
// carry-save layer). One set of rows per clock.
module tb_wallace_tree;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]  r2 [2];  logic [7:0]  s2, c2;
  logic [7:0]  r3 [3];  logic [7:0]  s3, c3;
  logic [11:0] r5 [5];  logic [11:0] s5, c5;
  logic [15:0] r9 [9];  logic [15:0] s9, c9;

  wallace_tree #(.ROWS(2), .W(8))  dut2 (.rows(r2), .sum_row(s2), .carry_row(c2));
  wallace_tree #(.ROWS(3), .W(8))  dut3 (.rows(r3), .sum_row(s3), .carry_row(c3));
  wallace_tree #(.ROWS(5), .W(12)) dut5 (.rows(r5), .sum_row(s5), .carry_row(c5));
  wallace_tree #(.ROWS(9), .W(16)) dut9 (.rows(r9), .sum_row(s9), .carry_row(c9));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 2; i++) r2[i] = '0;
    for (int i = 0; i < 3; i++) r3[i] = '0;
    for (int i = 0; i < 5; i++) r5[i] = '0;
    for (int i = 0; i < 9; i++) r9[i] = '0;
    for (int t = 0; t < 1000; t++) begin
      longint e2, e3, e5, e9;
      @(posedge clk);
      e2 = 0; e3 = 0; e5 = 0; e9 = 0;
      for (int i = 0; i < 2; i++) begin r2[i] = 8'($urandom);  e2 += r2[i]; end
      for (int i = 0; i < 3; i++) begin r3[i] = 8'($urandom);  e3 += r3[i]; end
      for (int i = 0; i < 5; i++) begin r5[i] = 12'($urandom); e5 += r5[i]; end
      for (int i = 0; i < 9; i++) begin r9[i] = 16'($urandom); e9 += r9[i]; end
      @(negedge clk);
      check("rows2", (longint'(s2) + c2) & 255,   e2 & 255);
      check("rows3", (longint'(s3) + c3) & 255,   e3 & 255);
      check("rows5", (longint'(s5) + c5) & 4095,  e5 & 4095);
      check("rows9", (longint'(s9) + c9) & 65535, e9 & 65535);
      check("csa sum",   s3, r3[0] ^ r3[1] ^ r3[2]);
      check("csa carry", c3, 8'(((r3[0] & r3[1]) | (r3[0] & r3[2]) | (r3[1] & r3[2])) << 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
