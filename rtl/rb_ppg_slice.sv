// rb_ppg_slice - one digit of the RB partial product generator.
//
// Produces digit j of the compound RB partial product C*M. The input stage
// selects the upper bit h (bit j of 8M or 4M) and the lower bit l (bit j of
// 2M or M) with AND-OR gates; when the 5M flag is set the two bits of digit j
// of the RB multiple 5M are taken instead (f5.p as h, f5.n as l). The output
// stage is a two-way swap: pp = (h, l) when swap is low (upper multiple
// positive), pp = (l, h) when swap is high. The multiples are two's complement
// words, so in the most significant slice (MSD = 1) their sign bits have
// negative weight: there h and l of the binary multiples change sides before
// the swap, which makes the row an ordinary RB number without sign extension
// or correction constant. Interface: the four multiplicand bits that digit j
// can need, digit j of 5M and the row's control word. Combinational.
// The selecting input stage and swapping output stage follow the design; the
// sign handling in the top slice is this implementation's own choice.
module rb_ppg_slice
  import rb_pkg::*;
#(
  parameter bit MSD = 1'b0  // this slice is the row's most significant digit
) (
  input  logic        b1,    // bit j of 1M
  input  logic        b2,    // bit j of 2M
  input  logic        b4,    // bit j of 4M
  input  logic        b8,    // bit j of 8M
  input  rb_digit_t   f5,    // digit j of 5M
  input  crbbe_ctrl_t ctrl,
  output rb_digit_t   pp
);

  logic hb, lb;  // selected binary bits
  logic h, l;    // upper and lower operand bits after sign handling and 5M

  always_comb begin
    hb = (ctrl.m2_hi & b8) | (ctrl.m1_hi & b4);
    lb = (ctrl.m2_lo & b2) | (ctrl.m1_lo & b1);
    if (ctrl.f5m) begin
      h = f5.p;
      l = f5.n;
    end else if (MSD) begin
      h = lb;
      l = hb;
    end else begin
      h = hb;
      l = lb;
    end
    pp.p = (ctrl.swap_n & h) | (ctrl.swap & l);
    pp.n = (ctrl.swap_n & l) | (ctrl.swap & h);
  end

endmodule
