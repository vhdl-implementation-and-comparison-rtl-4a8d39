// full_adder: one-bit full adder, the cell the ripple-carry adder and
// subtractor are chained from.
//
// s = a ^ b ^ cin, cout = majority(a, b, cin). Interface: a, b, cin in;
// s, cout out. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
