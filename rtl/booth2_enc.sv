// booth2_enc - radix-4 (Booth-2) digit encoder.
//
// Recodes three overlapping multiplier bits b(2i+1) b(2i) b(2i-1) into the
// Booth digit d(i) = -2*b(2i+1) + b(2i) + b(2i-1), d(i) in {-2..2}, given as a
// one-hot magnitude (m1: |d|=1, m2: |d|=2, neither: d=0) and a sign bit. As in
// the encoder pair of the covalent RB Booth encoder, the sign is taken straight
// from the MSB b(2i+1), so 000 is +0 and 111 is -0; the reformatting stage
// relies on that signed zero. Purely combinational.
module booth2_enc (
  input  logic [2:0] bits,  // {b(2i+1), b(2i), b(2i-1)}
  output logic       m1,    // |d| = 1
  output logic       m2,    // |d| = 2
  output logic       sgn    // sign of d (signed zero included)
);

  always_comb begin
    m1  = bits[1] ^ bits[0];
    m2  = (bits[2] & ~bits[1] & ~bits[0]) | (~bits[2] & bits[1] & bits[0]);
    sgn = bits[2];
  end

endmodule
