// rbfa: redundant binary full adder cell (one digit position).
//
// Adds two RB digits a, b in {-1,0,1} carry-free.  The digit sum
// z = a + b in {-2..2} is split into an outgoing carry c_out and an interim
// digit w with z = 2*c_out + w.  For z = +-1 the split looks one position
// down (h_in = both digits there are non-negative):
//   h_in = 1: +1 -> (c,w) = (+1,-1),  -1 -> (0,-1)
//   h_in = 0: +1 -> (0,+1),           -1 -> (-1,+1)
// which guarantees that the final digit s = w + c_in stays in {-1,0,1}, so
// no carry ever travels more than one position.  h_out tells the next
// position up whether both digits here are non-negative.  This is the
// classic two-step RB addition; the cell's gate structure is this design's
// own.  Outputs use the canonical codes +1 = (1,0), 0 = (0,0), -1 = (0,1).
// Purely combinational.
module rbfa
  import rbm_pkg::*;
(
  input  rb_digit_t a,
  input  rb_digit_t b,
  input  logic      h_in,   // both digits one position down are >= 0
  input  rb_digit_t c_in,   // carry from one position down
  output rb_digit_t s,      // sum digit
  output rb_digit_t c_out,  // carry to one position up
  output logic      h_out   // both digits here are >= 0
);

  logic signed [2:0] z, w, c, sum;

  always_comb begin
    h_out = ~(a.n & ~a.p) & ~(b.n & ~b.p);
    z = 3'(signed'({1'b0, a.p})) - 3'(signed'({1'b0, a.n}))
      + 3'(signed'({1'b0, b.p})) - 3'(signed'({1'b0, b.n}));
    unique case (z)
      3'sd2:   begin c = 3'sd1;  w = 3'sd0; end
      -3'sd2:  begin c = -3'sd1; w = 3'sd0; end
      3'sd1:   begin c = h_in ? 3'sd1 : 3'sd0;  w = h_in ? -3'sd1 : 3'sd1; end
      -3'sd1:  begin c = h_in ? 3'sd0 : -3'sd1; w = h_in ? -3'sd1 : 3'sd1; end
      default: begin c = 3'sd0;  w = 3'sd0; end
    endcase
    c_out.p = (c == 3'sd1);
    c_out.n = (c == -3'sd1);
    sum = w + 3'(signed'({1'b0, c_in.p})) - 3'(signed'({1'b0, c_in.n}));
    s.p = (sum == 3'sd1);
    s.n = (sum == -3'sd1);
  end

endmodule
