// tb_booth_wallace_mult: self-checking test of the Booth-Wallace multiplier.
//
// The 4-bit multiplier is checked exhaustively: p must be the low 8 bits of
// x * y with x unsigned and y two's complement, and the worked example
// 3 * 4 = 12 must come out. 5-bit and 8-bit instances (odd width, more
// Wallace rows) are checked on random operands. One pair per clock.
module tb_booth_wallace_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] x4, y4;  logic [7:0]  p4;
  logic [4:0] x5, y5;  logic [9:0]  p5;
  logic [7:0] x8, y8;  logic [15:0] p8;

  booth_wallace_mult #(.N(4)) dut4 (.x(x4), .y(y4), .p(p4));
  booth_wallace_mult #(.N(5)) dut5 (.x(x5), .y(y5), .p(p5));
  booth_wallace_mult #(.N(8)) dut8 (.x(x8), .y(y8), .p(p8));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    x4 = '0; y4 = '0; x5 = '0; y5 = '0; x8 = '0; y8 = '0;
    @(posedge clk);
    x4 = 4'd3; y4 = 4'd4;
    @(negedge clk);
    check("3*4", p4, 12);
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        @(posedge clk);
        x4 = 4'(i); y4 = 4'(j);
        x5 = 5'($urandom); y5 = 5'($urandom);
        x8 = 8'($urandom); y8 = 8'($urandom);
        @(negedge clk);
        check("N=4", p4, (longint'(i) * longint'($signed(y4))) & 255);
        check("N=5", p5, (longint'(x5) * longint'($signed(y5))) & 1023);
        check("N=8", p8, (longint'(x8) * longint'($signed(y8))) & 65535);
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
