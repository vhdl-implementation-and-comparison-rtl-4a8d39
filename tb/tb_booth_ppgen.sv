// tb_booth_ppgen: self-checking test of the Booth partial-product generator.
//
// The testbench recodes the multiplier itself (from the digit table, not
// through the encoder), drives the generator with those digits and checks
// (a) every digit row against digit * x * 4^i less the correction bit,
// (b) the correction row, and (c) that all rows add up, modulo 2^(2N), to
// the product of the unsigned multiplicand and the two's-complement
// multiplier. Exhaustive for N = 4, random for N = 6. One pair per clock.
module tb_booth_ppgen;
  import cmul_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] x4;  booth_digit_t [1:0] d4;  logic [7:0]  pp4 [3];
  logic [5:0] x6;  booth_digit_t [2:0] d6;  logic [11:0] pp6 [4];

  booth_ppgen #(.N(4)) dut4 (.x(x4), .digit(d4), .pp(pp4));
  booth_ppgen #(.N(6)) dut6 (.x(x6), .digit(d6), .pp(pp6));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Radix-4 digit i of a two's-complement value v, from the recoding table.
  function automatic booth_digit_t digit_of(longint v, int i);
    bit hi, mid, lo;
    int d;
    booth_digit_t r;
    hi  = v[2*i+1];
    mid = v[2*i];
    lo  = (i == 0) ? 1'b0 : v[2*i-1];
    d   = -2 * int'(hi) + int'(mid) + int'(lo);
    r.neg = d < 0;
    r.two = (d == 2) || (d == -2);
    r.one = (d == 1) || (d == -1);
    return r;
  endfunction

  initial begin
    x4 = '0; d4 = '0; x6 = '0; d6 = '0;
    for (int xv = 0; xv < 16; xv++) begin
      for (int yv = -8; yv < 8; yv++) begin
        longint y6, sum4, sum6, mask4, mask6;
        y6 = longint'($urandom_range(0, 63)) - 32;
        @(posedge clk);
        x4 = 4'(xv);
        for (int i = 0; i < 2; i++) d4[i] = digit_of(yv, i);
        x6 = 6'($urandom);
        for (int i = 0; i < 3; i++) d6[i] = digit_of(y6, i);
        @(negedge clk);
        mask4 = 255; mask6 = 4095;
        sum4 = 0; sum6 = 0;
        for (int i = 0; i < 2; i++) begin
          longint row;
          // the row holds d*x*4^i minus the correction bit of a negative digit
          row = booth_value(d4[i]) * xv * (longint'(1) << (2 * i))
                - (d4[i].neg ? (longint'(1) << (2 * i)) : 0);
          check("row4", pp4[i], row & mask4);
          sum4 += pp4[i];
        end
        check("corr4", pp4[2], (d4[0].neg ? 1 : 0) + (d4[1].neg ? 4 : 0));
        sum4 += pp4[2];
        check("sum4", sum4 & mask4, (longint'(xv) * yv) & mask4);
        for (int i = 0; i < 4; i++) sum6 += pp6[i];
        check("sum6", sum6 & mask6, (longint'(x6) * y6) & mask6);
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
