// crbbe2_reformat - reformatting logic of the covalent RB Booth-2 encoder.
//
// Takes the outputs of two adjacent Booth-2 encoders, the lower one for d(i)
// and the upper one for d(i+1), and produces the control word that lets a
// single RB partial product generator row form C*M with C = 4*d(i+1) + d(i).
// Because Booth digits never produce two neighbours that both push the same
// way except in a few cases, C can almost always be written as
//   C = +(4|d(i+1)| - |d(i)|)   (d(i+1) > 0, "positive-negative pair") or
//   C = -(4|d(i+1)| - |d(i)|)   (d(i+1) < 0, "negative-positive pair"),
// i.e. a difference of two power-of-two multiples. The logic:
//   swap   = (1m(i+1) | 2m(i+1)) XNOR sgn(i+1)     sign of d(i+1); for a zero
//            d(i+1) the complemented sign (then d(i) decides the sign of C).
//   conv   = 1m(i+1) & 2m(i) & (sgn(i) XNOR sgn(i+1))
//            duplets 1,2 and -1,-2 (C = +-6) are rewritten as 2,-2 / -2,2.
//   2M(i+1) = ~conv XNOR 2m(i+1),   1M(i+1) = conv XOR 1m(i+1)
//   5M      = (sgn(i) XNOR sgn(i+1)) & 1m(i+1) & 1m(i)   duplets 1,1 / -1,-1.
// Interface: plain encoder outputs in, rb_pkg::crbbe_ctrl_t out.
// Timing: combinational, two gate levels after the encoders.
// The equations follow the covalent encoder's published ones; the outer
// operator of the 1M(i+1) equation is XOR, the only reading under which the
// upper magnitude is cleared when it is converted from 1 to 2.
module crbbe2_reformat
  import rb_pkg::*;
(
  input  logic        m1_lo,   // 1m(i)
  input  logic        m2_lo,   // 2m(i)
  input  logic        sgn_lo,  // sgn(i)
  input  logic        m1_hi,   // 1m(i+1)
  input  logic        m2_hi,   // 2m(i+1)
  input  logic        sgn_hi,  // sgn(i+1)
  output crbbe_ctrl_t ctrl
);

  logic same_sign;
  logic conv;

  always_comb begin
    same_sign   = ~(sgn_lo ^ sgn_hi);
    conv        = m1_hi & m2_lo & same_sign;
    ctrl.swap   = ~((m1_hi | m2_hi) ^ sgn_hi);
    ctrl.swap_n = ~ctrl.swap;
    ctrl.m2_hi  = ~(~conv ^ m2_hi);
    ctrl.m1_hi  = conv ^ m1_hi;
    ctrl.m1_lo  = m1_lo;
    ctrl.m2_lo  = m2_lo;
    ctrl.f5m    = same_sign & m1_hi & m1_lo;
  end

  // With one-hot magnitudes in, each side keeps at most one multiple and the
  // 5M case never coincides with the 6M rewrite.
  always_comb begin
    if (!(m1_lo && m2_lo) && !(m1_hi && m2_hi)) begin
      assert (!(ctrl.m1_hi && ctrl.m2_hi) && !(ctrl.m1_lo && ctrl.m2_lo))
        else $error("crbbe2_reformat: upper or lower select not one-hot");
      assert (!(ctrl.f5m && conv))
        else $error("crbbe2_reformat: 5M and 6M rewrite at once");
    end
  end

endmodule
