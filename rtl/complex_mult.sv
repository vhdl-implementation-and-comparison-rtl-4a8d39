// complex_mult: (A + jB)(C + jD) = R + jI with four real multipliers, one
// subtractor and one adder.
//
//   R = A*C - B*D        I = B*C + A*D
//
// The four products are formed in parallel by real multipliers of the kind
// chosen by KIND: the Urdhva Tiryakbhyam (vertical and crosswise) multiplier
// for MULT_VEDIC, the radix-4 Booth / Wallace-tree multiplier for
// MULT_BOOTH. A ripple-carry subtractor then gives R and a ripple-carry adder
// gives I. Both reference variants share this structure and differ only in
// the real multiplier.
//
// Widths follow the reference 4-bit design: N-bit operand parts, a 2N-bit
// real output and a (2N+1)-bit imaginary output, whose top bit is the
// adder's carry out. R is therefore A*C - B*D modulo 2^(2N): a negative real
// part appears in two's complement and, for the Vedic variant, whose
// products are unsigned and reach 2^(2N) - 2^(N+1) + 1, the most negative
// differences wrap. I is the plain sum of the two 2N-bit product words.
//
// Number formats of the multipliers:
//   MULT_VEDIC : every operand unsigned.
//   MULT_BOOTH : A and B (multiplicands) unsigned, C and D (Booth-recoded
//                multipliers) two's complement; products modulo 2^(2N).
//
// Interface: re_a (A), im_a (B), re_b (C), im_b (D) in; re_out (R), im_out
// (I) out. Purely combinational, no clock or reset.
module complex_mult
  import cmul_pkg::*;
#(
  parameter int unsigned N    = N_DEFAULT,
  parameter mult_kind_t  KIND = MULT_VEDIC
) (
  input  logic [N-1:0]   re_a,
  input  logic [N-1:0]   im_a,
  input  logic [N-1:0]   re_b,
  input  logic [N-1:0]   im_b,
  output logic [2*N-1:0] re_out,
  output logic [2*N:0]   im_out
);
  localparam int unsigned PW = 2 * N;

  // p_ac = A*C, p_bd = B*D, p_bc = B*C, p_ad = A*D
  logic [PW-1:0] p_ac, p_bd, p_bc, p_ad;

  if (KIND == MULT_VEDIC) begin : g_vedic
    urdhva_mult #(.N(N)) u_ac (.a(re_a), .b(re_b), .p(p_ac));
    urdhva_mult #(.N(N)) u_bd (.a(im_a), .b(im_b), .p(p_bd));
    urdhva_mult #(.N(N)) u_bc (.a(im_a), .b(re_b), .p(p_bc));
    urdhva_mult #(.N(N)) u_ad (.a(re_a), .b(im_b), .p(p_ad));
  end else begin : g_booth
    booth_wallace_mult #(.N(N)) u_ac (.x(re_a), .y(re_b), .p(p_ac));
    booth_wallace_mult #(.N(N)) u_bd (.x(im_a), .y(im_b), .p(p_bd));
    booth_wallace_mult #(.N(N)) u_bc (.x(im_a), .y(re_b), .p(p_bc));
    booth_wallace_mult #(.N(N)) u_ad (.x(re_a), .y(im_b), .p(p_ad));
  end

  // Real part: A*C - B*D. The no-borrow flag is not an output of the
  // reference design; R is the 2N-bit difference.
  ripple_subtractor #(.W(PW)) u_sub (
    .a        (p_ac),
    .b        (p_bd),
    .diff     (re_out),
    .no_borrow()
  );

  // Imaginary part: B*C + A*D, carry out is the top bit.
  ripple_adder #(.W(PW)) u_add (
    .a   (p_bc),
    .b   (p_ad),
    .cin (1'b0),
    .sum (im_out[PW-1:0]),
    .cout(im_out[PW])
  );
endmodule
