// rb_5m_gen - generator of the hard multiple 5M in redundant binary form.
//
// The only multiple of the covalent Booth-2 coefficient set {0,1,2,4,8,+-3,
// +-6, ...} that is not a difference of two power-of-two multiples is 5M. It is
// made once per multiplier, shared by every partial product row, as 4M + M
// with one carry-free RB adder, so it costs a constant delay outside the
// critical path. Both operands are two's complement numbers, which are RB
// numbers whose top digit has negative weight: bits below the top go to the
// positive side, the sign bit to the negative side. 4M and M are both taken
// N+2 bits wide (the width of 4M); the sum has N+3 digits and value exactly 5M.
// Making 5M as 4M + M with a carry-free RB adder follows the design; reusing
// the general rb_adder and sharing one generator are choices made here.
// Interface: signed multiplicand in, (N+3)-digit RB number out. Combinational.
module rb_5m_gen
  import rb_pkg::*;
#(
  parameter int N = 8  // multiplicand width
) (
  input  logic signed [N-1:0] m,
  output rb_digit_t   [N+2:0] f5   // value 5*m
);

  localparam int W = N + 2;

  logic signed [W-1:0] v1, v4;
  rb_digit_t   [W-1:0] r1, r4;

  always_comb begin
    v1 = W'(m);
    v4 = W'(m) <<< 2;
    for (int j = 0; j < W; j++) begin
      if (j == W - 1) begin
        r1[j] = '{p: 1'b0, n: v1[j]};
        r4[j] = '{p: 1'b0, n: v4[j]};
      end else begin
        r1[j] = '{p: v1[j], n: 1'b0};
        r4[j] = '{p: v4[j], n: 1'b0};
      end
    end
  end

  rb_adder #(.W(W)) u_add (.x(r4), .y(r1), .z(f5));

endmodule
