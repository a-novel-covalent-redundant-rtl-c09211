// tb_rb_sum_tree - test of the RBA summing tree for 2, 3 and 4 rows.
// Instances for operand widths 8 (one adder), 12 (odd row passed through a
// level) and 16 (two levels) receive random RB partial products, including
// the (1,1) code of zero. The output value must equal sum(row_k * 16**k)
// modulo 2**(2N), computed here from the digit values.
module tb_rb_sum_tree;
  import rb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  rb_digit_t [1:0][10:0] pp8;
  rb_digit_t [15:0]      s8;
  rb_digit_t [2:0][14:0] pp12;
  rb_digit_t [23:0]      s12;
  rb_digit_t [3:0][18:0] pp16;
  rb_digit_t [31:0]      s16;

  rb_sum_tree                 dut8  (.pp(pp8),  .sum(s8));
  rb_sum_tree #(.N(12))       dut12 (.pp(pp12), .sum(s12));
  rb_sum_tree #(.N(16))       dut16 (.pp(pp16), .sum(s16));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // value of an RB number given as its flat bit pattern, nd digits
  function automatic longint val(logic [127:0] bits, int nd);
    longint v = 0;
    for (int j = 0; j < nd; j++)
      v += (longint'(bits[2*j+1]) - longint'(bits[2*j])) <<< j;
    return v;
  endfunction

  function automatic longint modw(longint v, int w);
    longint m = longint'(1) <<< w;
    return ((v % m) + m) % m;
  endfunction

  initial begin
    for (int i = 0; i < 10000; i++) begin
      longint e8, e12, e16;
      pp8  = 44'({$urandom, $urandom});
      pp12 = 90'({$urandom, $urandom, $urandom});
      pp16 = 152'({$urandom, $urandom, $urandom, $urandom, $urandom});
      @(posedge clk);
      e8 = 0; e12 = 0; e16 = 0;
      for (int k = 0; k < 2; k++) e8  += val(128'(pp8[k]), 11) <<< (4 * k);
      for (int k = 0; k < 3; k++) e12 += val(128'(pp12[k]), 15) <<< (4 * k);
      for (int k = 0; k < 4; k++) e16 += val(128'(pp16[k]), 19) <<< (4 * k);
      checks += 3;
      if (modw(val(128'(s8), 16), 16) != modw(e8, 16)) begin
        failures++;
        $display("FAIL N=8 exp %0d got %0d", e8, val(128'(s8), 16));
      end
      if (modw(val(128'(s12), 24), 24) != modw(e12, 24)) begin
        failures++;
        $display("FAIL N=12 exp %0d got %0d", e12, val(128'(s12), 24));
      end
      if (modw(val(128'(s16), 32), 32) != modw(e16, 32)) begin
        failures++;
        $display("FAIL N=16 exp %0d got %0d", e16, val(128'(s16), 32));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
