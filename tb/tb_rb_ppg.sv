// tb_rb_ppg - test of one RB partial product generator row at N = 8.
// For every signed multiplicand and every five-bit multiplier field the row
// is driven by a covalent Booth-2 encoder and the shared 5M generator; the
// value of the RB output must equal field * m, with the field value
// -8*b4 + 4*b3 + 2*b2 + b1 + b0 computed here.
module tb_rb_ppg;
  import rb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 8;

  logic signed [N-1:0] m;
  logic        [4:0]   bits;
  rb_digit_t   [N+2:0] f5, pp;
  crbbe_ctrl_t         ctrl;

  rb_5m_gen #(.N(N)) u_5m  (.m, .f5);
  crbbe2_enc         u_enc (.bits, .ctrl);
  rb_ppg             dut   (.m, .f5, .ctrl, .pp);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int mv = -(1 << (N - 1)); mv < (1 << (N - 1)); mv++) begin
      for (int bv = 0; bv < 32; bv++) begin
        int field, g;
        m = N'(mv);
        bits = 5'(bv);
        @(posedge clk);
        field = -8 * int'(bits[4]) + 4 * int'(bits[3]) + 2 * int'(bits[2])
              + int'(bits[1]) + int'(bits[0]);
        g = 0;
        for (int j = 0; j < N + 3; j++) g += rb_digit_val(pp[j]) * (1 << j);
        checks++;
        if (g != field * mv) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d field=%0d got %0d", mv, field, g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
