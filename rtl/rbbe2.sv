// rbbe2: RB Booth encoder, one redundant binary partial product (RBPP) row.
//
// A row is built from two neighbouring radix-4 Booth partial products,
// PP0 = d0*A (group {b1,b0,b-1} of the row's five multiplier bits) and
// PP1 = d1*A (group {b3,b2,b1}, weight 4).  PP0 goes to the positive bits
// and PP1, inverted, to the negative bits, so the row is PP0 + 4*PP1 without
// any addition.  Each Booth partial product is the (N+1)-bit vector
// p = (A, 2A or 0) XOR neg with sign bit s = p[N].
//
// Bit layout, in the row's own frame (digit 0 = weight of PP0's LSB):
//   xp[N+2:0] = {~s0, s0, s0, p0[N-1:0]}   positive bits, digits 0 .. N+2
//   xn[N:0]   = { s1, ~p1[N-1:0]}          negative bits, digits 2 .. N+2
//   f         = neg0                       +1 at digit 0 (PP0 correction)
//   e_n       = ~neg1                      -1 at digit 2 (PP1 correction
//                                          merged with the -1 of the RB code)
// so that  xp - 4*xn + f - 4*e_n = d0*A + 4*d1*A  exactly.  The three top
// positive bits fold PP0's sign extension and the constant left by
// inverting PP1 into bits, so no sign-extension row is needed.  (f, e_n) is
// the row's error-correcting word (ECW); rbmppg2 places it in the free low
// digits of the next row.  The inversion of one row and the -1 follow the
// RB partial product scheme of the design; the exact sign-extension bits are
// this design's own.  Purely combinational.
module rbbe2
  import rbm_pkg::*;
#(
  parameter int N = 32  // operand width
) (
  input  logic [N-1:0] a,     // multiplicand, two's complement
  input  logic [4:0]   bgrp,  // multiplier bits {b[4r+3] .. b[4r-1]}
  output logic [N+2:0] xp,    // positive bits, row digits 0 .. N+2
  output logic [N:0]   xn,    // negative bits, row digits 2 .. N+2
  output logic         f,     // ECW: +1 at row digit 0
  output logic         e_n    // ECW: -1 at row digit 2
);

  booth_sel_t sel0, sel1;
  logic [N:0] p0, p1;

  booth_enc u_enc0 (.grp(bgrp[2:0]), .sel(sel0));
  booth_enc u_enc1 (.grp(bgrp[4:2]), .sel(sel1));

  // (N+1)-bit Booth partial product: select A or 2A, then invert if negative.
  function automatic logic [N:0] booth_pp(logic [N-1:0] aa, booth_sel_t s);
    logic [N:0] ax;
    ax = {aa[N-1], aa};
    return ({(N+1){s.one}} & ax | {(N+1){s.two}} & {ax[N-1:0], 1'b0})
           ^ {(N+1){s.neg}};
  endfunction

  always_comb begin
    p0  = booth_pp(a, sel0);
    p1  = booth_pp(a, sel1);
    xp  = {~p0[N], p0[N], p0[N], p0[N-1:0]};
    xn  = {p1[N], ~p1[N-1:0]};
    f   = sel0.neg;
    e_n = ~sel1.neg;
  end

endmodule
