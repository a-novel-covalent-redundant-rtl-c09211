// crbbe2_enc - covalent redundant binary Booth-2 encoder (CRBBE-2).
//
// Encodes five multiplier bits b(2i+3) .. b(2i-1) (two overlapping Booth-2
// groups) into the control word of one compound RB partial product whose
// coefficient is C = 4*d(i+1) + d(i), C in {-8..8}. The lower Booth-2 encoder
// reads b(2i+1) b(2i) b(2i-1), the upper one b(2i+3) b(2i+2) b(2i+1); the
// reformatting stage (crbbe2_reformat) then turns their magnitude and sign
// signals into swap flags, upper/lower multiple selects and the 5M flag.
// One CRBBE-2 therefore replaces two normal Booth-2 encoders and yields one RB
// partial product instead of two binary ones, without a correction vector.
// Combinational.
module crbbe2_enc
  import rb_pkg::*;
(
  input  logic [4:0]  bits,  // {b(2i+3), b(2i+2), b(2i+1), b(2i), b(2i-1)}
  output crbbe_ctrl_t ctrl
);

  logic m1_lo, m2_lo, sgn_lo;
  logic m1_hi, m2_hi, sgn_hi;

  booth2_enc u_lo (.bits(bits[2:0]), .m1(m1_lo), .m2(m2_lo), .sgn(sgn_lo));
  booth2_enc u_hi (.bits(bits[4:2]), .m1(m1_hi), .m2(m2_hi), .sgn(sgn_hi));

  crbbe2_reformat u_fmt (
    .m1_lo, .m2_lo, .sgn_lo,
    .m1_hi, .m2_hi, .sgn_hi,
    .ctrl
  );

endmodule
