// rb_sum_tree - RB adder (RBA) summing tree for the compound partial products.
//
// Takes NPP RB partial products of PPW digits, row k weighted by 16**k (one
// CRBBE-2 row covers four multiplier bits), places them at digit offset 4*k in
// a 2N-digit field and reduces them pairwise with carry-free rb_adder levels,
// halving the row count per level (ceil(log2(NPP)) levels; an odd row passes
// to the next level). RB numbers are signed without a sign bit, so rows are
// zero-extended. Digits and the transfer out above 2N are dropped: the sum is
// kept modulo 2**(2N), which is exact because the product fits in 2N bits.
// For the 8x8 design NPP = 2 and the tree is a single RBA. The 2:1 reduction
// follows the design; the plain pairwise tree shape is a choice made here.
// Combinational.
module rb_sum_tree
  import rb_pkg::*;
#(
  parameter int N   = 8,      // operand width
  parameter int NPP = N / 4,  // number of RB partial products
  parameter int PPW = N + 3   // digits per partial product
) (
  input  rb_digit_t [NPP-1:0][PPW-1:0] pp,
  output rb_digit_t [2*N-1:0]          sum
);

  localparam int SW     = 2 * N;
  localparam int LEVELS = (NPP > 1) ? $clog2(NPP) : 0;

  // rows present at level l
  function automatic int rows_at(int l);
    return (NPP + (1 << l) - 1) >> l;
  endfunction

  // row0: the aligned partial products; g_level[l].nxt: rows after level l
  rb_digit_t [SW-1:0] row0 [NPP];

  for (genvar k = 0; k < NPP; k++) begin : g_align
    always_comb begin
      row0[k] = '0;
      for (int j = 0; j < PPW; j++) begin
        if (4 * k + j < SW) row0[k][4*k+j] = pp[k][j];
      end
    end
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    rb_digit_t [SW-1:0] cur [NPP];
    rb_digit_t [SW-1:0] nxt [NPP];

    if (l == 0) begin : g_first
      assign cur = row0;
    end else begin : g_next
      assign cur = g_level[l-1].nxt;
    end

    for (genvar k = 0; k < NPP; k++) begin : g_node
      if (k < rows_at(l + 1)) begin : g_used
        if (2 * k + 1 < rows_at(l)) begin : g_add
          rb_digit_t [SW:0] z;
          rb_adder #(.W(SW)) u_rba (.x(cur[2*k]), .y(cur[2*k+1]), .z(z));
          // z[SW] has weight 2**(2N): dropped, the sum is kept modulo 2**(2N)
          assign nxt[k] = z[SW-1:0];
        end else begin : g_pass
          assign nxt[k] = cur[2*k];
        end
      end else begin : g_unused
        assign nxt[k] = '0;
      end
    end
  end

  if (LEVELS == 0) begin : g_single
    assign sum = row0[0];
  end else begin : g_root
    assign sum = g_level[LEVELS-1].nxt[0];
  end

endmodule
