// ecw_absorb: removes the error-correcting word (ECW) of the last partial
// product row by re-coding a few digits of the first and the last row.
//
// The ECWs of all rows but the last fit in the empty low digits of the next
// row.  The last row's ECW (f: +1 at digit N-4, e_n: -1 at digit N-2) has no
// row below it.  Instead of spending an extra RB row on it, its value is
// added into a small window of digits that is otherwise fixed:
//   first row, positive bits at digits N, N+1, N+2  (s0, s0, ~s0)
//   last row, negative bits at digits N-2, N-1      (y0, y1)
//   last row, negative bits at digits N-4, N-3      (empty, become q0, q1)
// In units of 2^(N-4) the window plus the ECW is
//   T = 16*s0 + 32*s0 + 64*~s0 - 4*y0 - 8*y1 + f - 4*e_n,  32 <= T <= 65,
// and it is written back as  T = 16*qp - (8*m3 + 4*m2 + 2*q1 + q0)  with
// qp = ceil(T/16) in {2..5} on the three positive bits.  This follows the
// design's idea of folding the last ECW into the two sign MSBs of the first
// row and the two negative LSBs of the last row (with two new q bits below);
// with this design's sign-extension layout the first row contributes three
// positive bits to the window, so the re-coding table is this design's own.
// Purely combinational; 5 inputs, 7 outputs.
module ecw_absorb (
  input  logic       s0,     // sign of the first row's positive partial product
  input  logic [1:0] y,      // last row negative bits at digits N-1, N-2
  input  logic       f,      // last row ECW, +1 at digit N-4
  input  logic       e_n,    // last row ECW, -1 at digit N-2
  output logic [2:0] qp,     // new first-row positive bits, digits N+2..N
  output logic [1:0] qn,     // new last-row negative bits, digits N-1..N-2
  output logic [1:0] q       // new last-row negative bits, digits N-3..N-4
);

  logic [6:0] t;    // window value, 32..65
  logic [3:0] m;    // negative remainder, 0..15

  always_comb begin
    t   = (s0 ? 7'd48 : 7'd64) - {3'd0, y[1], y[0], 2'b00} + {6'd0, f}
          - {4'd0, e_n, 2'b00};
    qp  = 3'((t + 7'd15) >> 4);  // ceil(t / 16)
    m   = 4'({qp, 4'b0000} - t);
    qn  = m[3:2];
    q   = m[1:0];
  end

endmodule
