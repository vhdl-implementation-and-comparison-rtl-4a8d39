// tb_complex_mult_top: end-to-end test of the top level at its default
// size (4-bit operand parts), both complex multipliers on every one of the
// 65536 operand combinations.
//
// Outputs are compared with integer arithmetic (see tb_complex_mult for
// the number formats). The test also counts how often each mechanism of the
// design is exercised and fails if one never is:
//   - every radix-4 Booth digit value -2, -1, 0, +1, +2 in the multipliers,
//   - a negative Booth digit (two's-complement negation of the multiplicand),
//   - an Urdhva column whose carry into the next column is 2 or more,
//   - a negative real part (borrow of the subtractor) in each variant,
//   - a carry into the top bit of the imaginary part in each variant.
// The eight vectors of the reference Booth simulation are checked by value.
// One vector per clock; a watchdog ends the run.
module tb_complex_mult_top;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] re_a, im_a, re_b, im_b;
  logic [7:0] vedic_re, booth_re;
  logic [8:0] vedic_im, booth_im;

  complex_mult_top dut (
    .re_a(re_a), .im_a(im_a), .re_b(re_b), .im_b(im_b),
    .vedic_re(vedic_re), .vedic_im(vedic_im),
    .booth_re(booth_re), .booth_im(booth_im));

  // mechanism counters
  int digit_seen [5];          // index = digit + 2
  int neg_digit = 0, multi_carry = 0;
  int vedic_neg_re = 0, booth_neg_re = 0, vedic_im_carry = 0, booth_im_carry = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint sx4(longint y);
    return (y >= 8) ? y - 16 : y;
  endfunction

  // 4-bit Booth product: unsigned x times two's-complement y, modulo 256
  function automatic longint bprod(longint x, longint y);
    return (x * sx4(y)) & 255;
  endfunction

  // Radix-4 digits of a 4-bit two's-complement multiplier, counted.
  task automatic count_digits(input longint y);
    int d0, d1;
    d0 = -2 * int'(y[1]) + int'(y[0]);
    d1 = -2 * int'(y[3]) + int'(y[2]) + int'(y[1]);
    digit_seen[d0 + 2]++;
    digit_seen[d1 + 2]++;
    if (d0 < 0 || d1 < 0) neg_digit++;
  endtask

  // Largest column carry of the 4-bit vertical-and-crosswise product.
  function automatic int max_column_carry(longint x, longint y);
    int carry, s, m;
    carry = 0; m = 0;
    for (int k = 0; k < 7; k++) begin
      s = carry;
      for (int i = 0; i < 4; i++)
        if (k - i >= 0 && k - i < 4) s += int'(x[i] & y[k-i]);
      carry = s / 2;
      if (carry > m) m = carry;
    end
    return m;
  endfunction

  localparam int FIG_RE [8] = '{0, 16, 32, 48, 64, 80, 96, 112};
  localparam int FIG_IM [8] = '{241, 229, 221, 217, 217, 221, 229, 241};

  initial begin
    for (int i = 0; i < 5; i++) digit_seen[i] = 0;
    re_a = '0; im_a = '0; re_b = '0; im_b = '0;
    for (int k = 0; k < 8; k++) begin
      @(posedge clk);
      re_a = 4'(15 - k); im_a = 4'(k); re_b = 4'(k); im_b = 4'(15 - k);
      @(negedge clk);
      check("waveform re", booth_re, FIG_RE[k]);
      check("waveform im", booth_im, FIG_IM[k]);
    end
    for (int v = 0; v < 65536; v++) begin
      longint av, bv, cv, dv, vre, vim, bre, bim;
      av = v & 15; bv = (v >> 4) & 15; cv = (v >> 8) & 15; dv = (v >> 12) & 15;
      @(posedge clk);
      re_a = 4'(av); im_a = 4'(bv); re_b = 4'(cv); im_b = 4'(dv);
      @(negedge clk);
      vre = av * cv - bv * dv;
      vim = bv * cv + av * dv;
      bre = bprod(av, cv) - bprod(bv, dv);
      bim = bprod(bv, cv) + bprod(av, dv);
      check("vedic re", vedic_re, vre & 255);
      check("vedic im", vedic_im, vim);
      check("booth re", booth_re, bre & 255);
      check("booth im", booth_im, bim);
      count_digits(cv);
      count_digits(dv);
      if (max_column_carry(av, cv) >= 2) multi_carry++;
      if (vre < 0) vedic_neg_re++;
      if (bre < 0) booth_neg_re++;
      if (vim >= 256) vedic_im_carry++;
      if (bim >= 256) booth_im_carry++;
    end
    for (int i = 0; i < 5; i++) begin
      $display("booth digit %0d seen %0d times", i - 2, digit_seen[i]);
      check("digit exercised", digit_seen[i] > 0, 1);
    end
    $display("negative digits %0d, multi-bit column carries %0d", neg_digit, multi_carry);
    $display("negative real part: vedic %0d booth %0d", vedic_neg_re, booth_neg_re);
    $display("imaginary carry out: vedic %0d booth %0d", vedic_im_carry, booth_im_carry);
    check("negation exercised",     neg_digit > 0, 1);
    check("column carry exercised", multi_carry > 0, 1);
    check("vedic borrow exercised", vedic_neg_re > 0, 1);
    check("booth borrow exercised", booth_neg_re > 0, 1);
    check("vedic carry exercised",  vedic_im_carry > 0, 1);
    check("booth carry exercised",  booth_im_carry > 0, 1);
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
