// tb_booth2_enc - exhaustive self-checking test of the Booth-2 digit encoder.
// All eight bit groups are applied; the expected digit -2*b2 + b1 + b0 is
// computed here and compared with the magnitude selects and the sign.
module tb_booth2_enc;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] bits;
  logic m1, m2, sgn;

  booth2_enc dut (.bits, .m1, .m2, .sgn);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int d, mag;
      bits = 3'(v);
      @(posedge clk);
      d   = -2 * int'(bits[2]) + int'(bits[1]) + int'(bits[0]);
      mag = (d < 0) ? -d : d;
      checks++;
      if (m1 !== (mag == 1) || m2 !== (mag == 2) || sgn !== bits[2]) begin
        failures++;
        $display("FAIL bits=%b d=%0d m1=%b m2=%b sgn=%b", bits, d, m1, m2, sgn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
