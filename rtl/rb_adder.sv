// rb_adder - carry-free redundant binary adder (RBA).
//
// Adds two W-digit RB numbers x and y into a (W+1)-digit RB number z with
// z = x + y exactly. Each position forms s = x(j) + y(j) in {-2..2} and splits
// it into a transfer c(j+1) and an interim digit w(j), s = 2*c(j+1) + w(j),
// using one bit of look-ahead from position j-1 ("neither digit there is
// negative"): when that holds the incoming transfer is 0 or +1, so s = +-1 is
// split with w = -1; otherwise it is 0 or -1 and w = +1 is chosen. Then
// z(j) = w(j) + c(j) always stays in {-1,0,1}, so no carry ripples: the delay
// is constant in W. z(W) is the transfer out of the top digit.
// Input digits may use either code of zero; output digits never use (1,1).
// The multiplier design only calls for a carry-free RBA; this particular
// digit rule is a textbook one chosen here. Combinational.
module rb_adder
  import rb_pkg::*;
#(
  parameter int W = 16  // digits per operand
) (
  input  rb_digit_t [W-1:0] x,
  input  rb_digit_t [W-1:0] y,
  output rb_digit_t [W:0]   z
);

  logic signed [2:0] s [W];   // digit sum, -2..2
  logic signed [1:0] w [W];   // interim digit
  logic signed [1:0] c [W+1]; // transfer into position j
  logic              nonneg [W];

  always_comb begin
    for (int j = 0; j < W; j++) begin
      // modulo-8 arithmetic gives the right two's complement code for -2..2
      s[j] = 3'(x[j].p) - 3'(x[j].n) + 3'(y[j].p) - 3'(y[j].n);
      nonneg[j] = ~((x[j].n & ~x[j].p) | (y[j].n & ~y[j].p));
    end
    c[0] = 2'sd0;
    for (int j = 0; j < W; j++) begin
      // position below j: none for j = 0, treated as non-negative (transfer 0)
      logic low_nonneg;
      low_nonneg = (j == 0) ? 1'b1 : nonneg[j-1];
      unique case (s[j])
        3'sd2:  begin c[j+1] = 2'sd1;  w[j] = 2'sd0; end
        3'sd1:  begin
                  if (low_nonneg) begin c[j+1] = 2'sd1; w[j] = -2'sd1; end
                  else            begin c[j+1] = 2'sd0; w[j] = 2'sd1;  end
                end
        -3'sd1: begin
                  if (low_nonneg) begin c[j+1] = 2'sd0;  w[j] = -2'sd1; end
                  else            begin c[j+1] = -2'sd1; w[j] = 2'sd1;  end
                end
        -3'sd2: begin c[j+1] = -2'sd1; w[j] = 2'sd0; end
        default: begin c[j+1] = 2'sd0; w[j] = 2'sd0; end
      endcase
    end
    for (int j = 0; j < W; j++) begin
      logic signed [2:0] zv;
      zv = 3'(w[j]) + 3'(c[j]);
      z[j].p = (zv == 3'sd1);
      z[j].n = (zv == -3'sd1);
    end
    z[W].p = (c[W] == 2'sd1);
    z[W].n = (c[W] == -2'sd1);
  end

endmodule
