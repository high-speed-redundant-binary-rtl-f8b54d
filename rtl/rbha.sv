// rbha: redundant binary half adder cell (one digit position).
//
// Used where only one of the two rows being added has a digit.  It is the
// RB full adder with the second operand fixed at 0: the digit a in {-1,0,1}
// becomes (c_out, w) with a = 2*c_out + w, choosing for a = +1 the split
// (+1,-1) when the position below is non-negative (h_in) and (0,+1)
// otherwise, and for a = -1 the split (0,-1) or (-1,+1).  The sum digit is
// s = w + c_in, always in {-1,0,1}.  h_out = (a >= 0).  Canonical output
// codes as in rbfa.  Purely combinational.
module rbha
  import rbm_pkg::*;
(
  input  rb_digit_t a,
  input  logic      h_in,   // both digits one position down are >= 0
  input  rb_digit_t c_in,   // carry from one position down
  output rb_digit_t s,      // sum digit
  output rb_digit_t c_out,  // carry to one position up
  output logic      h_out   // the digit here is >= 0
);

  logic pos, neg;  // a is +1 / a is -1
  rb_digit_t w;

  always_comb begin
    pos     = a.p & ~a.n;
    neg     = a.n & ~a.p;
    h_out   = ~neg;
    c_out.p = pos & h_in;
    c_out.n = neg & ~h_in;
    // interim digit: -1 if (pos & h_in) or (neg & h_in), +1 if not h_in
    w.n     = (pos | neg) & h_in;
    w.p     = (pos | neg) & ~h_in;
    // s = w + c_in; the lookahead guarantees w and c_in never both +1 or -1
    s.p     = (w.p & ~c_in.p & ~c_in.n) | (~w.p & ~w.n & c_in.p);
    s.n     = (w.n & ~c_in.p & ~c_in.n) | (~w.p & ~w.n & c_in.n);
  end

endmodule
