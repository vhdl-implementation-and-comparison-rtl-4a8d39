// tb_complex_mult: self-checking test of the complex multiplier in both of
// its multiplier variants.
//
// R = A*C - B*D (2N bits, modulo 2^(2N)) and I = B*C + A*D (2N+1 bits) are
// recomputed here from integer arithmetic: with unsigned operands for the
// Vedic variant, and for the Booth variant with every product taken as
// (unsigned multiplicand) * (two's-complement multiplier) modulo 2^(2N).
// The 4-bit instances see all 65536 operand combinations; the eight vectors
// of the reference Booth simulation waveform are checked by value; 6-bit
// instances are checked on random operands. One vector per clock.
module tb_complex_mult;
  import cmul_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] a, b, c, d;
  logic [7:0] v_re, b_re;
  logic [8:0] v_im, b_im;
  logic [5:0] a6, b6, c6, d6;
  logic [11:0] v_re6, b_re6;
  logic [12:0] v_im6, b_im6;

  complex_mult #(.N(4), .KIND(MULT_VEDIC)) dut_v (
    .re_a(a), .im_a(b), .re_b(c), .im_b(d), .re_out(v_re), .im_out(v_im));
  complex_mult #(.N(4), .KIND(MULT_BOOTH)) dut_b (
    .re_a(a), .im_a(b), .re_b(c), .im_b(d), .re_out(b_re), .im_out(b_im));
  complex_mult #(.N(6), .KIND(MULT_VEDIC)) dut_v6 (
    .re_a(a6), .im_a(b6), .re_b(c6), .im_b(d6), .re_out(v_re6), .im_out(v_im6));
  complex_mult #(.N(6), .KIND(MULT_BOOTH)) dut_b6 (
    .re_a(a6), .im_a(b6), .re_b(c6), .im_b(d6), .re_out(b_re6), .im_out(b_im6));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // n-bit Booth product: unsigned x times two's-complement y, modulo 2^(2n)
  function automatic longint bprod(longint x, longint y, int n);
    longint ys;
    ys = (y >= (longint'(1) << (n - 1))) ? y - (longint'(1) << n) : y;
    return (x * ys) & ((longint'(1) << (2 * n)) - 1);
  endfunction

  task automatic apply4(input int av, input int bv, input int cv, input int dv);
    @(posedge clk);
    a = 4'(av); b = 4'(bv); c = 4'(cv); d = 4'(dv);
    @(negedge clk);
  endtask

  // Booth waveform of the reference: A = 15-k, B = k, C = k, D = 15-k
  localparam int FIG_RE [8] = '{0, 16, 32, 48, 64, 80, 96, 112};
  localparam int FIG_IM [8] = '{241, 229, 221, 217, 217, 221, 229, 241};

  initial begin
    a = '0; b = '0; c = '0; d = '0; a6 = '0; b6 = '0; c6 = '0; d6 = '0;
    for (int k = 0; k < 8; k++) begin
      apply4(15 - k, k, k, 15 - k);
      check("waveform re", b_re, FIG_RE[k]);
      check("waveform im", b_im, FIG_IM[k]);
    end
    for (int v = 0; v < 65536; v++) begin
      longint av, bv, cv, dv, a6v, b6v, c6v, d6v;
      av = v & 15; bv = (v >> 4) & 15; cv = (v >> 8) & 15; dv = (v >> 12) & 15;
      a6v = $urandom_range(0, 63); b6v = $urandom_range(0, 63);
      c6v = $urandom_range(0, 63); d6v = $urandom_range(0, 63);
      a6 = 6'(a6v); b6 = 6'(b6v); c6 = 6'(c6v); d6 = 6'(d6v);
      apply4(int'(av), int'(bv), int'(cv), int'(dv));
      check("vedic re", v_re, (av * cv - bv * dv) & 255);
      check("vedic im", v_im, bv * cv + av * dv);
      check("booth re", b_re, (bprod(av, cv, 4) - bprod(bv, dv, 4)) & 255);
      check("booth im", b_im, bprod(bv, cv, 4) + bprod(av, dv, 4));
      check("vedic re N=6", v_re6, (a6v * c6v - b6v * d6v) & 4095);
      check("vedic im N=6", v_im6, b6v * c6v + a6v * d6v);
      check("booth re N=6", b_re6, (bprod(a6v, c6v, 6) - bprod(b6v, d6v, 6)) & 4095);
      check("booth im N=6", b_im6, bprod(b6v, c6v, 6) + bprod(a6v, d6v, 6));
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
