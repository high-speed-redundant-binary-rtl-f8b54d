// booth_enc: radix-4 modified Booth encoder for one multiplier group.
//
// The group is {b[2k+1], b[2k], b[2k-1]} (b[-1] = 0 for the first group) and
// stands for the digit -2*b[2k+1] + b[2k] + b[2k-1] in {-2,...,2}.  The
// encoder turns it into the select lines of rbm_pkg::booth_sel_t:
//   one = b[2k] ^ b[2k-1]            digit is +-1
//   two = digit is +-2 (groups 011 and 100)
//   neg = b[2k+1] & ~(b[2k] & b[2k-1]) digit is negative
// Group 111 (digit "-0") is encoded as plain zero, not as an inverted zero,
// so that it needs no correction bit; this matches the design's correction
// terms, which treat 111 like the non-negative groups.  The select-line
// form is an implementation choice.  Purely combinational.
module booth_enc
  import rbm_pkg::*;
(
  input  logic [2:0]  grp,  // {b[2k+1], b[2k], b[2k-1]}
  output booth_sel_t  sel
);

  always_comb begin
    sel.one = grp[1] ^ grp[0];
    sel.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    sel.neg = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule
