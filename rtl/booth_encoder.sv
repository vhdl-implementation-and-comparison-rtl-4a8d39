// booth_encoder: radix-4 modified Booth encoding (MBE) of the multiplier.
//
// The N-bit two's-complement multiplier y is sign-extended to an even
// width, a 0 is appended below bit 0, and each overlapping triplet
// (y[2i+1], y[2i], y[2i-1]) is recoded to one digit in {-2,-1,0,+1,+2}:
//
//   000 -> 0   001 -> +1   010 -> +1   011 -> +2
//   100 -> -2  101 -> -1   110 -> -1   111 -> 0
//
// so y = sum_i digit[i] * 4^i and an N-bit multiplier needs only ceil(N/2)
// partial products instead of N. Each digit is emitted as
// cmul_pkg::booth_digit_t {neg, two, one}. Purely combinational.
//
// Radix-4 encoding is what the reference Booth multiplier uses; the recoding
// table is the standard one and the {neg, two, one} code is this design's
// choice.
module booth_encoder
  import cmul_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  localparam int unsigned ND = booth_digits(N)
) (
  input  logic         [N-1:0]  y,
  output booth_digit_t [ND-1:0] digit
);
  // y with sign extension to 2*ND bits and the implied 0 below bit 0.
  logic [2*ND-1:0] y_ext;
  logic [2*ND:0]   yx;

  assign y_ext = (2 * ND)'($signed(y));
  assign yx    = {y_ext, 1'b0};

  for (genvar i = 0; i < ND; i++) begin : g_dig
    logic hi, mid, lo;   // y[2i+1], y[2i], y[2i-1]
    assign {hi, mid, lo} = yx[2*i+2 -: 3];
    always_comb begin
      digit[i].one = mid ^ lo;
      digit[i].two = (hi & ~mid & ~lo) | (~hi & mid & lo);
      digit[i].neg = hi & ~(mid & lo);
    end
  end
endmodule
