// rbm_pkg: types and constant functions shared by the redundant binary (RB)
// multiplier.
//
// A radix-4 modified Booth (MBE) digit is carried as three select lines
// (one, two, neg): the partial product is +-1*A, +-2*A or 0.  An RB digit is
// carried as a pair of bits (pos, neg) whose value is pos - neg; an RB vector
// is two plain bit vectors of the same width.
//
// The row-span functions describe where the digits of each RB partial product
// row can be non-zero in the 2N-digit product frame.  The reduction tree uses
// them to decide which digit positions of an accumulation block need a full
// adder cell and which only a half adder cell.  They follow the row layout of
// rbmppg2: row r holds its positive part at digits 4r .. 4r+N+2, its negative
// part at 4r+2 .. 4r+N+2, and (for r >= 1) the error-correcting digits of row
// r-1 at 4r-4 and 4r-2.
package rbm_pkg;

  typedef struct packed {
    logic one;  // select +-A
    logic two;  // select +-2A
    logic neg;  // invert and add the correction bit
  } booth_sel_t;

  // One RB digit, value p - n; (1,1) is an allowed second code for 0.
  typedef struct packed {
    logic p;
    logic n;
  } rb_digit_t;

  // Lowest digit a partial product row can occupy.
  function automatic int row_lo(int r);
    return (r == 0) ? 0 : 4 * r - 4;
  endfunction

  // Highest digit a partial product row can occupy, clipped to the frame.
  function automatic int row_hi(int r, int n);
    int hi;
    hi = 4 * r + n + 2;
    return (hi > 2 * n - 1) ? 2 * n - 1 : hi;
  endfunction

  // Digit span of the tree node at level l (0 = the rows themselves) that
  // covers rows i*2^l .. (i+1)*2^l-1.  Each accumulation level can grow the
  // top by one carry digit.
  function automatic int node_lo(int l, int i);
    return row_lo(i << l);
  endfunction

  function automatic int node_hi(int l, int i, int n);
    int hi;
    hi = row_hi(((i + 1) << l) - 1, n) + l;
    return (hi > 2 * n - 1) ? 2 * n - 1 : hi;
  endfunction

endpackage
