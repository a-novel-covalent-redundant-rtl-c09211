// tb_crbbe2_reformat - exhaustive test of the CRBBE-2 reformatting logic.
// For each of the 32 five-bit multiplier fields the testbench recodes the two
// Booth-2 digits itself, drives the reformatter with their magnitudes and
// signs, and checks that the control word describes C = 4*d(i+1) + d(i):
// as +-(upper - lower) with one-hot selects, or as +-5M, with the swap rule
// of the covalent encoder (sign of d(i+1), complemented sign when it is zero).
module tb_crbbe2_reformat;
  import rb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic m1_lo, m2_lo, sgn_lo, m1_hi, m2_hi, sgn_hi;
  crbbe_ctrl_t ctrl;

  crbbe2_reformat dut (.m1_lo, .m2_lo, .sgn_lo, .m1_hi, .m2_hi, .sgn_hi, .ctrl);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int booth(logic [2:0] g);
    return -2 * int'(g[2]) + int'(g[1]) + int'(g[0]);
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [4:0] b;
      int dl, dh, c, hi, lo, crec;
      bit exp_swap;
      b  = 5'(v);
      dl = booth(b[2:0]);
      dh = booth(b[4:2]);
      c  = 4 * dh + dl;
      m1_lo = (iabs(dl) == 1); m2_lo = (iabs(dl) == 2); sgn_lo = b[2];
      m1_hi = (iabs(dh) == 1); m2_hi = (iabs(dh) == 2); sgn_hi = b[4];
      @(posedge clk);
      hi = 4 * int'(ctrl.m1_hi) + 8 * int'(ctrl.m2_hi);
      lo = int'(ctrl.m1_lo) + 2 * int'(ctrl.m2_lo);
      if (ctrl.f5m) crec = ctrl.swap ? -5 : 5;
      else          crec = ctrl.swap ? (lo - hi) : (hi - lo);
      exp_swap = (dh != 0) ? b[4] : ~b[4];
      checks++;
      if (crec != c) begin
        failures++;
        $display("FAIL value bits=%b dh=%0d dl=%0d C=%0d got %0d", b, dh, dl, c, crec);
      end
      checks++;
      if (ctrl.swap !== exp_swap || ctrl.swap_n !== ~ctrl.swap) begin
        failures++;
        $display("FAIL swap bits=%b swap=%b swap_n=%b", b, ctrl.swap, ctrl.swap_n);
      end
      checks++;
      if ((ctrl.m1_hi & ctrl.m2_hi) || (ctrl.m1_lo & ctrl.m2_lo)
          || (ctrl.f5m !== (iabs(c) == 5))) begin
        failures++;
        $display("FAIL selects bits=%b ctrl=%p", b, ctrl);
      end
      // duplets 1,2 and -1,-2 must become 2,-2 and -2,2 (8M and 2M)
      if (iabs(dh) == 1 && iabs(dl) == 2 && b[4] == b[2]) begin
        checks++;
        if (!(ctrl.m2_hi && !ctrl.m1_hi && ctrl.m2_lo)) begin
          failures++;
          $display("FAIL 6M conversion bits=%b ctrl=%p", b, ctrl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
