// booth_ppgen: partial-product generator for the radix-4 Booth multiplier.
//
// For every Booth digit d_i the generator selects 0, X or 2X from the
// multiplicand, inverts the selection when d_i is negative and shifts it
// left by 2i. Negation is two's complement, ~m + 1; the "+1" of every
// negative row is not added here but placed as a single bit at weight 2^(2i)
// in one extra correction row, so the whole negation is absorbed by the
// adder tree that follows. Rows are PW = 2N bits wide and all arithmetic is
// modulo 2^PW, the product width, so no sign-extension bits are needed.
//
// The multiplicand x is read as an unsigned number (zero-extended) and the
// multiplier, through its digits, as two's complement. That pairing is this
// design's reading of the reference simulation results, where the 4-bit
// products agree with exactly this convention.
//
// Interface: x, digit in; pp[0..ND-1] the digit rows, pp[ND] the correction
// row. The sum of all ND+1 rows, modulo 2^PW, equals x * y. Purely
// combinational.
module booth_ppgen
  import cmul_pkg::*;
#(
  parameter int unsigned N    = N_DEFAULT,
  localparam int unsigned ND   = booth_digits(N),
  localparam int unsigned PW   = 2 * N,
  localparam int unsigned ROWS = ND + 1
) (
  input  logic         [N-1:0]  x,
  input  booth_digit_t [ND-1:0] digit,
  output logic         [PW-1:0] pp [ROWS]
);
  always_comb begin
    logic [PW-1:0] mag;
    logic [PW-1:0] corr;
    corr = '0;
    for (int i = 0; i < ND; i++) begin
      // 0, X or 2X
      if (digit[i].two)      mag = PW'(x) << 1;
      else if (digit[i].one) mag = PW'(x);
      else                   mag = '0;
      // one's complement for a negative digit, +1 goes to the correction row
      if (digit[i].neg) mag = ~mag;
      pp[i]          = mag << (2 * i);
      corr[2 * i]    = digit[i].neg;
    end
    pp[ND] = corr;
  end
endmodule
