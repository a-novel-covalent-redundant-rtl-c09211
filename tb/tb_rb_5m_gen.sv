// tb_rb_5m_gen - exhaustive test of the 5M hard multiple generator: for all
// 256 signed 8-bit multiplicands the RB output must have value 5*m.
module tb_rb_5m_gen;
  import rb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 8;

  logic signed [N-1:0] m;
  rb_digit_t   [N+2:0] f5;

  rb_5m_gen dut (.m, .f5);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (N - 1)); v < (1 << (N - 1)); v++) begin
      int g;
      m = N'(v);
      @(posedge clk);
      g = 0;
      for (int j = 0; j < N + 3; j++) g += rb_digit_val(f5[j]) * (1 << j);
      checks++;
      if (g != 5 * v) begin
        failures++;
        $display("FAIL m=%0d got %0d", v, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
