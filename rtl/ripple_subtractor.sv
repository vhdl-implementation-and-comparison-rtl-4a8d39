// ripple_subtractor: W-bit two's-complement subtractor, diff = a - b.
//
// Built as a ripple_adder fed with the bitwise inverse of b and a carry in
// of 1 (a + ~b + 1). The result is taken modulo 2^W. no_borrow is the
// adder's carry out: 1 when a >= b read as unsigned numbers, 0 when the
// unsigned difference wrapped. Purely combinational.
module ripple_subtractor #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff,
  output logic         no_borrow
);
  ripple_adder #(.W(W)) u_add (
    .a   (a),
    .b   (~b),
    .cin (1'b1),
    .sum (diff),
    .cout(no_borrow)
  );
endmodule
