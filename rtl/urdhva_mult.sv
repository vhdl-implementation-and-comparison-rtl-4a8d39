// urdhva_mult: unsigned N x N multiplier on the Urdhva Tiryakbhyam
// ("vertically and crosswise") rule.
//
// The product is formed column by column. Column k (k = 0 .. 2N-2) gathers
// every bit product a[i] & b[j] with i + j = k -- the vertical product for
// the outer columns, the crosswise ones in between -- and adds the carry
// word left over by column k-1:
//
//   s[k] = c[k-1] + sum_{i+j=k} a[i] b[j],   p[k] = s[k][0],   c[k] = s[k] >> 1
//
// For N = 4 this is the seven-step recurrence R0 .. C6R6 of the method; the
// last carry c[2N-2] is the top product bit. All column sums exist at once,
// so the bit products are formed in a single step and only the short carry
// words ripple between columns.
//
// The carry into a column never exceeds N, so a column sum fits in
// clog2(2N+1) bits. Operands are unsigned. Purely combinational: p is valid
// one propagation delay after a and b.
//
// The column recurrence is the reference method; adding each column as one
// word-level sum, rather than through a fixed tree of half and full adders,
// is this design's choice, as is the generic width N.
module urdhva_mult #(
  parameter int unsigned N = cmul_pkg::N_DEFAULT
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned COLS = 2 * N - 1;
  localparam int unsigned SW   = $clog2(2 * N + 1);

  always_comb begin
    logic [SW-1:0] s, carry;
    carry = '0;
    p     = '0;
    for (int k = 0; k < COLS; k++) begin
      s = carry;
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N) begin
          s = s + SW'(a[i] & b[k-i]);
        end
      end
      p[k]  = s[0];
      carry = s >> 1;
    end
    // The last carry is at most one bit wide because a*b < 2^(2N); it is
    // the top product bit.
    p[2*N-1] = carry[0];
  end

endmodule
