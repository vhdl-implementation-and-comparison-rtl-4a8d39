// tb_booth_encoder: self-checking test of the radix-4 Booth encoder.
//
// For every 4-bit multiplier (and every 5-bit and 8-bit one in further
// instances) the digits must be well formed -- never both |d| = 1 and
// |d| = 2, never a negative zero -- and must recombine to the two's
// complement value of the multiplier: y = sum_i d_i * 4^i. The worked
// example multiplier 4 (0100) must give the digits {0, +1}. One value per
// clock; a watchdog ends the run.
module tb_booth_encoder;
  import cmul_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] y4;  booth_digit_t [1:0] d4;
  logic [4:0] y5;  booth_digit_t [2:0] d5;
  logic [7:0] y8;  booth_digit_t [3:0] d8;

  booth_encoder #(.N(4)) dut4 (.y(y4), .digit(d4));
  booth_encoder #(.N(5)) dut5 (.y(y5), .digit(d5));
  booth_encoder #(.N(8)) dut8 (.y(y8), .digit(d8));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // A digit is well formed when it is not both one and two and is not -0.
  function automatic bit well_formed(booth_digit_t d);
    return !(d.one && d.two) && !(d.neg && !d.one && !d.two);
  endfunction

  initial begin
    y4 = '0; y5 = '0; y8 = '0;
    @(posedge clk);
    y4 = 4'b0100;
    @(negedge clk);
    check("example digit0", booth_value(d4[0]), 0);
    check("example digit1", booth_value(d4[1]), 1);
    for (int v = 0; v < 256; v++) begin
      longint s4, s5, s8;
      @(posedge clk);
      y4 = 4'(v); y5 = 5'(v); y8 = 8'(v);
      @(negedge clk);
      s4 = 0; s5 = 0; s8 = 0;
      for (int i = 0; i < 2; i++) begin
        s4 += booth_value(d4[i]) * (longint'(1) << (2 * i));
        check("wf4", well_formed(d4[i]), 1);
      end
      for (int i = 0; i < 3; i++) begin
        s5 += booth_value(d5[i]) * (longint'(1) << (2 * i));
        check("wf5", well_formed(d5[i]), 1);
      end
      for (int i = 0; i < 4; i++) begin
        s8 += booth_value(d8[i]) * (longint'(1) << (2 * i));
        check("wf8", well_formed(d8[i]), 1);
      end
      check("N=4 value", s4, longint'($signed(y4)));
      check("N=5 value", s5, longint'($signed(y5)));
      check("N=8 value", s8, longint'($signed(y8)));
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
