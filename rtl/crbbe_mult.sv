// crbbe_mult - N x N-bit signed redundant binary multiplier built on the
// covalent redundant binary Booth-2 encoder (CRBBE-2). Default: 8 x 8 bits.
//
// The multiplier b is split into N/4 overlapping 5-bit fields
// b(4k+3) .. b(4k-1) (b(-1) = 0). Each field feeds one CRBBE-2, which joins
// two adjacent Booth-2 digits into one compound coefficient
// C(k) = 4*d(2k+1) + d(2k) in {-8..8}, so b = sum C(k) * 16**k. The row's
// partial product generator forms C(k)*a as one RB number, normally as the
// difference of two power-of-two multiples (e.g. 3a = 4a - a, 6a = 8a - 2a),
// and for C = +-5 from the shared RB multiple 5a. This gives N/4 RB partial
// products - the same count as a normal Booth-2 design pairing binary rows -
// but with no correction vector. A carry-free RBA tree sums the rows and one
// subtraction converts the RB result to the two's complement product.
//
//   a --+--> rb_5m_gen -------------+
//       +--------------------------+--> rb_ppg (x N/4) --> rb_sum_tree --> rb2nb --> p
//   b ----> crbbe2_enc (x N/4) ----+
//
// Interface: a (multiplicand) and b (multiplier), both two's complement;
// p = a * b, 2N bits two's complement. Timing: purely combinational, no clock;
// a new operand pair may be applied every cycle of whatever clock surrounds it.
// N must be a multiple of 4.
module crbbe_mult
  import rb_pkg::*;
#(
  parameter int N = 8  // operand width
) (
  input  logic signed [N-1:0]   a,  // multiplicand M
  input  logic signed [N-1:0]   b,  // multiplier
  output logic signed [2*N-1:0] p   // product a*b
);

  localparam int NPP = N / 4;
  localparam int PPW = N + 3;

  if (N % 4 != 0) begin : g_bad_n
    $error("crbbe_mult: N must be a multiple of 4");
  end

  logic        [N:0]               bx;    // {b, b(-1) = 0}
  rb_digit_t   [PPW-1:0]           f5;    // shared 5M multiple
  crbbe_ctrl_t [NPP-1:0]           ctrl;
  rb_digit_t   [NPP-1:0][PPW-1:0]  pp;
  rb_digit_t   [2*N-1:0]           sum;

  assign bx = {b, 1'b0};

  rb_5m_gen #(.N(N)) u_5m (.m(a), .f5(f5));

  for (genvar k = 0; k < NPP; k++) begin : g_row
    crbbe2_enc u_enc (.bits(bx[4*k+4 -: 5]), .ctrl(ctrl[k]));
    rb_ppg #(.N(N)) u_ppg (.m(a), .f5(f5), .ctrl(ctrl[k]), .pp(pp[k]));
  end

  rb_sum_tree #(.N(N), .NPP(NPP), .PPW(PPW)) u_tree (.pp(pp), .sum(sum));

  rb2nb #(.W(2 * N)) u_conv (.x(sum), .y(p));

endmodule
