// rb_pkg - types shared by the covalent redundant binary (RB) Booth multiplier.
//
// An RB digit takes a value from {-1, 0, 1} and is held in positive-negative
// coding as two bits (p, n) with value p - n; (1,1) is a second code for 0.
// An RB number of W digits is a packed array rb_digit_t [W-1:0] whose digit j
// weighs 2**j; its value is simply sum((p_j - n_j) * 2**j), so it is signed
// without any sign bit and can be zero-extended freely.
//
// crbbe_ctrl_t is the control word that one covalent RB Booth-2 encoder
// (CRBBE-2) sends to the partial product generator row it drives. The
// compound coefficient C = 4*d(i+1) + d(i) of two adjacent Booth-2 digits is
// formed as the difference of an "upper" multiple (4M or 8M) and a "lower"
// multiple (M or 2M), or as the special multiple 5M; swap says which of the two
// goes to the negative side.
package rb_pkg;

  typedef struct packed {
    logic p;  // positive bit
    logic n;  // negative bit
  } rb_digit_t;

  typedef struct packed {
    logic m1_lo;   // lower multiple is 1M (|d(i)| = 1)
    logic m2_lo;   // lower multiple is 2M (|d(i)| = 2)
    logic m1_hi;   // upper multiple is 4M (converted 1M(i+1))
    logic m2_hi;   // upper multiple is 8M (converted 2M(i+1))
    logic f5m;     // coefficient is +5 or -5: use the 5M multiple
    logic swap;    // active high: upper multiple goes to the negative side
    logic swap_n;  // active low copy of swap for the PPG output stage
  } crbbe_ctrl_t;

  // Integer value of one RB digit (testbench and assertion helper).
  function automatic int rb_digit_val(rb_digit_t d);
    return int'(d.p) - int'(d.n);
  endfunction

endpackage
