// tb_rb_adder - self-checking test of the carry-free RB adder.
// A 2-digit instance is tested exhaustively over all digit codes (including
// the (1,1) code of zero); the default 16-digit instance gets corner cases
// (all +1, all -1, alternating) and random operands. Every sum is compared
// with the integer sum of the operand values, and no output digit may use
// the (1,1) code.
module tb_rb_adder;
  import rb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int WS = 2;
  localparam int WL = 16;
  localparam int FB = 2 * (WL + 1);  // flat bits of the widest sum
  localparam int LB = 2 * WL;        // flat bits of a wide operand

  rb_digit_t [WS-1:0] xs, ys;
  rb_digit_t [WS:0]   zs;
  rb_digit_t [WL-1:0] xl, yl;
  rb_digit_t [WL:0]   zl;

  rb_adder #(.W(WS)) dut_s (.x(xs), .y(ys), .z(zs));
  rb_adder           dut_l (.x(xl), .y(yl), .z(zl));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint val(logic [FB-1:0] bits, int nd);
    longint v = 0;
    for (int j = 0; j < nd; j++)
      v += (longint'(bits[2*j+1]) - longint'(bits[2*j])) <<< j;
    return v;
  endfunction

  function automatic bit has11(logic [FB-1:0] bits, int nd);
    for (int j = 0; j < nd; j++)
      if (bits[2*j+1] && bits[2*j]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check_l(string tag);
    longint e, g;
    @(posedge clk);
    e = val(FB'(xl), WL) + val(FB'(yl), WL);
    g = val(FB'(zl), WL + 1);
    checks++;
    if (e != g || has11(FB'(zl), WL + 1)) begin
      failures++;
      $display("FAIL %s expected %0d got %0d", tag, e, g);
    end
  endtask

  initial begin
    xl = '0; yl = '0;
    for (int v = 0; v < (1 << (4 * WS)); v++) begin
      longint e, g;
      {xs, ys} = (4 * WS)'(v);
      @(posedge clk);
      e = val(FB'(xs), WS) + val(FB'(ys), WS);
      g = val(FB'(zs), WS + 1);
      checks++;
      if (e != g || has11(FB'(zs), WS + 1)) begin
        failures++;
        $display("FAIL small x=%b y=%b z=%b", xs, ys, zs);
      end
    end
    for (int j = 0; j < WL; j++) begin xl[j] = '{1'b1, 1'b0}; yl[j] = '{1'b1, 1'b0}; end
    check_l("all +1");
    for (int j = 0; j < WL; j++) begin xl[j] = '{1'b0, 1'b1}; yl[j] = '{1'b0, 1'b1}; end
    check_l("all -1");
    for (int j = 0; j < WL; j++) begin
      xl[j] = (j % 2) ? '{1'b1, 1'b0} : '{1'b0, 1'b1};
      yl[j] = (j % 2) ? '{1'b0, 1'b1} : '{1'b1, 1'b0};
    end
    check_l("alternating");
    for (int i = 0; i < 20000; i++) begin
      xl = LB'({$urandom, $urandom});
      yl = LB'({$urandom, $urandom});
      check_l("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
