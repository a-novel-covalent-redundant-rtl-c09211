// tb_crbbe_mult - end-to-end test of the 8 x 8-bit CRBBE-2 RB multiplier at
// its default size.
// Phase 1 applies 4096 random signed operand pairs at a 100 MHz input rate
// (10 ns per pair): operands change on the falling edge and the product is
// checked on the next rising edge, so the multiplier must settle within one
// cycle with no pipeline latency. Phase 2 applies all 65536 operand pairs.
// Products are compared with a * b computed here. For every multiplier the
// testbench also classifies both coefficient rows from its own Booth
// recoding and counts how often each mechanism of the covalent encoder is
// exercised: +5M and -5M, the 6M duplet rewrites (1,2 -> 2,-2 and its
// negative), pos-neg and neg-pos pairs of two non-zero multiples, a positive
// and a negative zero upper digit in front of a non-zero lower digit, and the
// 8M multiple. A mechanism that never occurs counts as a failure.
module tb_crbbe_mult;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;  // 100 MHz

  localparam int N = 8;

  logic signed [N-1:0]   a, b;
  logic signed [2*N-1:0] p;

  crbbe_mult dut (.a, .b, .p);

  typedef enum int {
    EV_5M_POS, EV_5M_NEG, EV_6M_POS, EV_6M_NEG, EV_PAIR_PN, EV_PAIR_NP,
    EV_ZERO_POS, EV_ZERO_NEG, EV_8M, EV_COUNT
  } event_e;
  int ev [EV_COUNT];
  string ev_name [EV_COUNT] = '{"+5M", "-5M", "6M rewrite +", "6M rewrite -",
                               "pos-neg pair", "neg-pos pair", "+0 upper digit",
                               "-0 upper digit", "8M multiple"};

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int booth(logic [2:0] g);
    return -2 * int'(g[2]) + int'(g[1]) + int'(g[0]);
  endfunction

  task automatic classify(logic [N-1:0] bm);
    logic [N:0] bx;
    bx = {bm, 1'b0};
    for (int k = 0; k < N / 4; k++) begin
      logic [4:0] f;
      int dl, dh;
      f  = bx[4*k+4 -: 5];
      dl = booth(f[2:0]);
      dh = booth(f[4:2]);
      if (dh == 1 && dl == 1)   ev[EV_5M_POS]++;
      if (dh == -1 && dl == -1) ev[EV_5M_NEG]++;
      if (dh == 1 && dl == 2)   ev[EV_6M_POS]++;
      if (dh == -1 && dl == -2) ev[EV_6M_NEG]++;
      if (dh > 0 && dl < 0)     ev[EV_PAIR_PN]++;
      if (dh < 0 && dl > 0)     ev[EV_PAIR_NP]++;
      if (dh == 0 && !f[4] && dl != 0) ev[EV_ZERO_POS]++;
      if (dh == 0 && f[4] && dl != 0)  ev[EV_ZERO_NEG]++;
      if (dh == 2 || dh == -2 || (dh == 1 && dl == 2) || (dh == -1 && dl == -2))
        ev[EV_8M]++;
    end
  endtask

  task automatic check(string tag);
    int e;
    e = int'(a) * int'(b);
    checks++;
    if (p !== (2*N)'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d exp %0d got %0d", tag, a, b, e, p);
    end
  endtask

  initial begin
    foreach (ev[i]) ev[i] = 0;
    a = '0; b = '0;
    // phase 1: 4096 random pairs at one pair per 10 ns cycle
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      a = N'($urandom);
      b = N'($urandom);
      classify(b);
      @(posedge clk);
      check("random");
    end
    // phase 2: every operand pair
    for (int av = 0; av < (1 << N); av++) begin
      for (int bv = 0; bv < (1 << N); bv++) begin
        a = N'(av);
        b = N'(bv);
        #1;
        check("exhaustive");
      end
      if (av == 0) for (int bv = 0; bv < (1 << N); bv++) classify(N'(bv));
    end
    for (int i = 0; i < EV_COUNT; i++) begin
      $display("mechanism %-16s occurred %0d times", ev_name[i], ev[i]);
      checks++;
      if (ev[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", ev_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
