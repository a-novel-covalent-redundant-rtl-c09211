// rb2nb - redundant binary to normal binary (two's complement) converter.
//
// An RB number with positive bits X+ and negative bits X- has value X+ - X-,
// so the conversion is one W-bit subtraction, X+ + ~X- + 1. The result is the
// value modulo 2**W, which is the exact two's complement result whenever the
// value fits in W bits (it always does for the multiplier's product).
// Combinational; the only carry-propagate step of the multiplier. A plain
// subtractor is used here; a faster converter has the same function.
module rb2nb
  import rb_pkg::*;
#(
  parameter int W = 16  // digits in, bits out
) (
  input  rb_digit_t [W-1:0] x,
  output logic      [W-1:0] y
);

  logic [W-1:0] xp, xn;

  always_comb begin
    for (int j = 0; j < W; j++) begin
      xp[j] = x[j].p;
      xn[j] = x[j].n;
    end
    y = xp - xn;
  end

endmodule
