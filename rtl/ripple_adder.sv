// ripple_adder: W-bit ripple-carry adder.
//
// A chain of W full adders; the carry passes from bit 0 to bit W-1, so the
// delay grows linearly with W. This is the adder of the complex multiplier
// (imaginary part BC + AD, whose carry out becomes the extra output bit) and
// the final carry-propagate adder of the Booth-Wallace multiplier. The
// ripple structure follows the full-adder chain in the reference timing
// path; the width is a parameter.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module ripple_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
