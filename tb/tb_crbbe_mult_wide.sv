// tb_crbbe_mult_wide - the CRBBE-2 multiplier scaled to 16 x 16 bits.
// With four RB partial product rows the RBA tree has two levels. Corner
// operands (most negative, most positive, -1, 0, alternating bits) and random
// pairs are applied and each product is compared with a * b computed here.
module tb_crbbe_mult_wide;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 16;

  logic signed [N-1:0]   a, b;
  logic signed [2*N-1:0] p;

  crbbe_mult #(.N(N)) dut (.a, .b, .p);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint e;
    @(posedge clk);
    e = longint'(a) * longint'(b);
    checks++;
    if (p !== (2*N)'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d exp %0d got %0d", a, b, e, p);
    end
  endtask

  logic [N-1:0] corner [6] = '{16'h8000, 16'h7fff, 16'hffff, 16'h0000, 16'h5555, 16'haaaa};

  initial begin
    foreach (corner[i]) foreach (corner[j]) begin
      a = corner[i];
      b = corner[j];
      check();
    end
    for (int i = 0; i < 20000; i++) begin
      a = N'($urandom);
      b = N'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
