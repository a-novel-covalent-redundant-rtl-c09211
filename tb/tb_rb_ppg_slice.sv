// tb_rb_ppg_slice - exhaustive test of one RB partial product generator digit,
// for an ordinary slice and for the most significant slice. All multiplicand
// bit, 5M digit and control combinations are applied. The expected digit is
// worked out from which operand is the positive and which the negative one:
// upper (8M/4M) positive unless swap; in the top slice the binary sign bits
// weigh negatively, which reverses the sides; 5M digits pass (or swap) as is.
module tb_rb_ppg_slice;
  import rb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        b1, b2, b4, b8;
  rb_digit_t   f5;
  crbbe_ctrl_t ctrl;
  rb_digit_t   pp_lo, pp_hi;

  rb_ppg_slice #(.MSD(1'b0)) dut_n (.b1, .b2, .b4, .b8, .f5, .ctrl, .pp(pp_lo));
  rb_ppg_slice #(.MSD(1'b1)) dut_m (.b1, .b2, .b4, .b8, .f5, .ctrl, .pp(pp_hi));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 14); v++) begin
      logic [13:0] s;
      logic upper, lower, neg_side_upper;
      rb_digit_t e_n, e_m;
      s = 14'(v);
      {b1, b2, b4, b8} = s[3:0];
      f5 = s[5:4];
      ctrl.m1_lo = s[6]; ctrl.m2_lo = s[7];
      ctrl.m1_hi = s[8]; ctrl.m2_hi = s[9];
      ctrl.f5m   = s[10]; ctrl.swap = s[11]; ctrl.swap_n = ~s[11];
      if (s[13:12] != 2'b00) continue;  // skip repeats
      @(posedge clk);
      upper = (ctrl.m1_hi && b4) || (ctrl.m2_hi && b8);
      lower = (ctrl.m1_lo && b1) || (ctrl.m2_lo && b2);
      if (ctrl.f5m) begin
        e_n = ctrl.swap ? '{f5.n, f5.p} : f5;
        e_m = e_n;
      end else begin
        neg_side_upper = ctrl.swap;
        e_n = neg_side_upper ? '{lower, upper} : '{upper, lower};
        e_m = neg_side_upper ? '{upper, lower} : '{lower, upper};
      end
      checks++;
      if (pp_lo !== e_n || pp_hi !== e_m) begin
        failures++;
        $display("FAIL s=%b got %b/%b exp %b/%b", s, pp_lo, pp_hi, e_n, e_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
