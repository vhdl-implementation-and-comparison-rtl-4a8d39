// tb_urdhva_mult: self-checking test of the Urdhva Tiryakbhyam multiplier.
//
// The 4-bit instance (the reference size) is checked exhaustively against
// the arithmetic product, including the worked example 3 * 4 = 12 and the
// worst-case column carries of 15 * 15. An 8-bit and a 5-bit instance are
// checked on random operands to show the column recurrence holds for other
// widths. One operand pair is applied per clock; a watchdog ends the run.
module tb_urdhva_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;  logic [7:0]  p4;
  logic [7:0]  a8, b8;  logic [15:0] p8;
  logic [4:0]  a5, b5;  logic [9:0]  p5;

  urdhva_mult #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));
  urdhva_mult #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));
  urdhva_mult #(.N(5)) dut5 (.a(a5), .b(b5), .p(p5));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    a4 = '0; b4 = '0; a8 = '0; b8 = '0; a5 = '0; b5 = '0;
    @(posedge clk);
    // worked example from the Booth section, repeated for the Vedic unit
    a4 = 4'd3; b4 = 4'd4; a8 = '0; b8 = '0;
    @(negedge clk); check("3*4", p4, 12);
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        @(posedge clk);
        a4 = 4'(i); b4 = 4'(j);
        a8 = 8'($urandom); b8 = 8'($urandom);
        a5 = 5'($urandom); b5 = 5'($urandom);
        @(negedge clk);
        check("N=4", p4, i * j);
        check("N=8", p8, longint'(a8) * longint'(b8));
        check("N=5", p5, longint'(a5) * longint'(b5));
      end
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
