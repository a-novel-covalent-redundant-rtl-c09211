// tb_crbbe2_enc - exhaustive test of the covalent RB Booth-2 encoder.
// All 32 five-bit multiplier fields are applied. The coefficient the control
// word stands for must equal the value of the field, i.e. 4*d(i+1) + d(i)
// with Booth digits computed here, and each case of the duplet table is
// checked for its multiple pair: pos-neg and neg-pos pairs of power-of-two
// multiples, the 6M rewrite 8M - 2M and the 5M special case.
module tb_crbbe2_enc;
  import rb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]  bits;
  crbbe_ctrl_t ctrl;

  crbbe2_enc dut (.bits, .ctrl);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int field, c, hi, lo, exp_hi, exp_lo;
      bits = 5'(v);
      @(posedge clk);
      // value of the field: b(i+3)..b(i-1) recodes to -8*b4 + 4*b3 + 2*b2 + b1 + b0
      field = -8 * int'(bits[4]) + 4 * int'(bits[3]) + 2 * int'(bits[2])
            + int'(bits[1]) + int'(bits[0]);
      hi = 4 * int'(ctrl.m1_hi) + 8 * int'(ctrl.m2_hi);
      lo = int'(ctrl.m1_lo) + 2 * int'(ctrl.m2_lo);
      if (ctrl.f5m) c = ctrl.swap ? -5 : 5;
      else          c = ctrl.swap ? (lo - hi) : (hi - lo);
      checks++;
      if (c != field) begin
        failures++;
        $display("FAIL bits=%b field=%0d coded=%0d ctrl=%p", bits, field, c, ctrl);
      end
      // expected (upper, lower) multiple magnitudes for |C|; 2 is either
      // 0,2 (lower digit alone) or 1,-2 (4M - 2M), 5 is the 5M special case
      case ((field < 0) ? -field : field)
        0:       begin exp_hi = 0; exp_lo = 0; end
        1:       begin exp_hi = 0; exp_lo = 1; end
        2:       begin exp_hi = (bits[4:2] == 3'b001 || bits[4:2] == 3'b110) ? 4 : 0; exp_lo = 2; end
        3:       begin exp_hi = 4; exp_lo = 1; end
        4:       begin exp_hi = 4; exp_lo = 0; end
        6:       begin exp_hi = 8; exp_lo = 2; end
        7:       begin exp_hi = 8; exp_lo = 1; end
        8:       begin exp_hi = 8; exp_lo = 0; end
        default: begin exp_hi = -1; exp_lo = -1; end
      endcase
      if (exp_hi >= 0) begin
        checks++;
        if (hi != exp_hi || lo != exp_lo || ctrl.f5m) begin
          failures++;
          $display("FAIL pair bits=%b field=%0d hi=%0d lo=%0d", bits, field, hi, lo);
        end
      end
      if (field == 5 || field == -5) begin
        checks++;
        if (!ctrl.f5m || ctrl.swap != (field < 0)) begin
          failures++;
          $display("FAIL 5M bits=%b ctrl=%p", bits, ctrl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
