// tb_rb2nb - test of the RB to two's complement converter at 16 digits:
// corner cases and random RB numbers; the output must equal the RB value
// modulo 2**16, computed here digit by digit.
module tb_rb2nb;
  import rb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int W = 16;
  localparam int FB = 2 * W;  // flat bits of an RB number

  rb_digit_t [W-1:0] x;
  logic      [W-1:0] y;

  rb2nb dut (.x, .y);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int v;
    @(posedge clk);
    v = 0;
    for (int j = 0; j < W; j++) v += rb_digit_val(x[j]) * (1 << j);
    checks++;
    if (y !== W'(v)) begin
      failures++;
      $display("FAIL x=%b value %0d got %h", x, v, y);
    end
  endtask

  initial begin
    x = '0;
    check();
    for (int j = 0; j < W; j++) x[j] = '{1'b0, 1'b1};
    check();
    for (int j = 0; j < W; j++) x[j] = '{1'b1, 1'b0};
    check();
    for (int j = 0; j < W; j++) x[j] = '{1'b1, 1'b1};
    check();
    for (int i = 0; i < 20000; i++) begin
      x = FB'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
