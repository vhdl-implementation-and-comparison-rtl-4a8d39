// booth_wallace_mult: N x N multiplier from radix-4 Booth encoding and a
// Wallace carry-save tree.
//
// The three steps of the multiplier are kept as separate blocks:
//   1. booth_encoder recodes the multiplier y into ceil(N/2) radix-4 digits
//      and booth_ppgen turns them into partial-product rows of x;
//   2. wallace_tree reduces those rows (plus the negation-correction row)
//      with 3:2 carry-save adders to a sum row and a carry row;
//   3. a ripple-carry adder adds the two rows into the product.
//
// x is unsigned, y two's complement (see booth_ppgen); the product p is
// x * y modulo 2^(2N), i.e. the low 2N bits of the signed product.
// Purely combinational.
module booth_wallace_mult
  import cmul_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  localparam int unsigned ND = booth_digits(N),
  localparam int unsigned PW = 2 * N
) (
  input  logic [N-1:0]  x,
  input  logic [N-1:0]  y,
  output logic [PW-1:0] p
);
  booth_digit_t [ND-1:0] digit;
  logic [PW-1:0]         pp [ND+1];
  logic [PW-1:0]         sum_row, carry_row;

  booth_encoder #(.N(N)) u_mbe (
    .y    (y),
    .digit(digit)
  );

  booth_ppgen #(.N(N)) u_ppg (
    .x    (x),
    .digit(digit),
    .pp   (pp)
  );

  wallace_tree #(.ROWS(ND + 1), .W(PW)) u_wal (
    .rows     (pp),
    .sum_row  (sum_row),
    .carry_row(carry_row)
  );

  // Carry out of the top bit lies outside the 2N-bit product and is dropped.
  ripple_adder #(.W(PW)) u_cpa (
    .a   (sum_row),
    .b   (carry_row),
    .cin (1'b0),
    .sum (p),
    .cout()
  );
endmodule
