// cmul_pkg: types and constants shared by the complex multiplier.
//
// N_DEFAULT is the operand width of the reference configuration (4-bit real
// and imaginary parts). booth_digit_t is the one-hot-plus-sign form of a
// radix-4 Booth digit that the encoder hands to the partial-product
// generator; mult_kind_t selects which real multiplier a complex multiplier
// is built from.
package cmul_pkg;

  localparam int unsigned N_DEFAULT = 4;

  // Radix-4 Booth digit d in {-2,-1,0,+1,+2}:
  //   one = |d| == 1, two = |d| == 2, neg = d < 0.
  // Zero is one == 0 and two == 0 (neg is then don't-care and kept 0).
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_digit_t;

  typedef enum logic {
    MULT_VEDIC = 1'b0,   // Urdhva Tiryakbhyam (vertical and crosswise) multiplier
    MULT_BOOTH = 1'b1    // radix-4 Booth encoding + Wallace CSA tree
  } mult_kind_t;

  // Number of radix-4 digits for an n-bit multiplier.
  function automatic int unsigned booth_digits(int unsigned n);
    return (n + 1) / 2;
  endfunction

  // Value of a Booth digit as a small signed integer (used by testbenches
  // and assertions).
  function automatic int booth_value(booth_digit_t d);
    int v;
    v = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -v : v;
  endfunction

endpackage
