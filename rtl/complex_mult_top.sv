// complex_mult_top: the Vedic complex multiplier and the Booth-Wallace
// complex multiplier side by side on the same operands.
//
// Both instances compute (A + jB)(C + jD) with the structure of
// complex_mult; they differ only in the real multiplier (Urdhva
// Tiryakbhyam versus radix-4 Booth with a Wallace tree) and hence in the
// number format of the multiplier operands C and D (unsigned versus two's
// complement). The Vedic multiplier is the primary design; the Booth-Wallace
// one is the conventional reference it is compared against, kept so both
// can be simulated and synthesised from the same sources.
//
// Interface: re_a (A), im_a (B), re_b (C), im_b (D) in; vedic_re/vedic_im and
// booth_re/booth_im out, 2N and 2N+1 bits. Each half alone has the 4N + 4N+1
// pins of one reference complex multiplier (33 for N = 4). Purely
// combinational.
module complex_mult_top
  import cmul_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic [N-1:0]   re_a,
  input  logic [N-1:0]   im_a,
  input  logic [N-1:0]   re_b,
  input  logic [N-1:0]   im_b,
  output logic [2*N-1:0] vedic_re,
  output logic [2*N:0]   vedic_im,
  output logic [2*N-1:0] booth_re,
  output logic [2*N:0]   booth_im
);
  complex_mult #(.N(N), .KIND(MULT_VEDIC)) u_vedic (
    .re_a  (re_a),
    .im_a  (im_a),
    .re_b  (re_b),
    .im_b  (im_b),
    .re_out(vedic_re),
    .im_out(vedic_im)
  );

  complex_mult #(.N(N), .KIND(MULT_BOOTH)) u_booth (
    .re_a  (re_a),
    .im_a  (im_a),
    .re_b  (re_b),
    .im_b  (im_b),
    .re_out(booth_re),
    .im_out(booth_im)
  );
endmodule
