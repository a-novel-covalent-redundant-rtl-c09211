// rb_ppg - RB partial product generator row for one covalent Booth-2 encoder.
//
// N+3 rb_ppg_slice instances form the compound RB partial product C*M, where
// C = 4*d(i+1) + d(i) in {-8..8} is described by the CRBBE-2 control word. The
// multiples M, 2M, 4M and 8M are the multiplicand sign-extended to N+3 bits
// and shifted by 0..3, so every slice sees the four bits it can select; 8M
// needs exactly N+3 bits. The shared 5M multiple comes in as an (N+3)-digit RB
// number. Digit N+2 is the most significant slice, where the binary sign bits
// change sides. Output value (sum of (p-n)*2**j) is C*M. Combinational.
module rb_ppg
  import rb_pkg::*;
#(
  parameter int N = 8  // multiplicand width
) (
  input  logic signed [N-1:0] m,     // multiplicand M
  input  rb_digit_t   [N+2:0] f5,    // 5M as RB number
  input  crbbe_ctrl_t         ctrl,  // from crbbe2_enc
  output rb_digit_t   [N+2:0] pp     // RB partial product C*M
);

  localparam int W = N + 3;

  logic [W-1:0] m1, m2, m4, m8;

  always_comb begin
    m1 = W'(m);
    m2 = m1 << 1;
    m4 = m1 << 2;
    m8 = m1 << 3;
  end

  for (genvar j = 0; j < W; j++) begin : g_slice
    rb_ppg_slice #(.MSD(j == W - 1)) u_slice (
      .b1(m1[j]), .b2(m2[j]), .b4(m4[j]), .b8(m8[j]),
      .f5(f5[j]), .ctrl(ctrl), .pp(pp[j])
    );
  end

endmodule
