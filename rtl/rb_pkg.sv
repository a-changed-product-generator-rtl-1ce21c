// rb_pkg: types shared by the redundant-binary (RB) Booth multiplier.
//
// booth_sel_t carries the three select lines of one radix-4 modified Booth
// digit d in {-2,-1,0,+1,+2}: `one` selects |d| = 1, `two` selects |d| = 2
// and `neg` marks a negative digit. A zero digit has all three low.
// An RB number in this design is a pair of bit vectors (pos, neg) whose value
// is pos - neg, digit by digit; both bits set is a legal encoding of zero.
package rb_pkg;

  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_sel_t;

endpackage
