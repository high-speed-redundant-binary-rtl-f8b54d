// rbmppg2: RB modified partial product generator (RBMPPG-2).
//
// Turns the multiplicand A and the multiplier B (N-bit two's complement,
// N a power of two, N >= 8) into N/4 redundant binary partial product rows
// whose sum, modulo 2^(2N), is A*B.  A conventional RB Booth generator needs
// N/4 + 1 rows, the extra one holding the error-correcting word (ECW) that
// collects the Booth correction bits and the -1 of the RB coding.  Here:
//   * row r (r = 0 .. N/4-1) is one rbbe2 block fed by B[4r+3 : 4r-1];
//     its positive bits start at digit 4r and its negative bits at 4r+2;
//   * the ECW of row r (+1 at digit 4r, -1 at digit 4r+2) is put in the
//     empty low digits of row r+1;
//   * the ECW of the last row is folded, by ecw_absorb, into the sign bits
//     of row 0 (digits N..N+2) and the lowest negative bits of the last row
//     (digits N-4..N-1).
// Each output row is a pair of 2N-bit vectors (positive, negative) in the
// product frame.  Purely combinational.
module rbmppg2
  import rbm_pkg::*;
#(
  parameter int N = 32  // operand width
) (
  input  logic [N-1:0]   a,              // multiplicand
  input  logic [N-1:0]   b,              // multiplier
  output logic [2*N-1:0] pp_p [N/4],     // positive bits of each RB row
  output logic [2*N-1:0] pp_n [N/4]      // negative bits of each RB row
);

  localparam int R = N / 4;
  localparam int W = 2 * N;

  if (N < 8 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("rbmppg2: N must be a power of two and at least 8");
  end

  logic [N:0]   bext;
  logic [N+2:0] xp [R];
  logic [N:0]   xn [R];
  logic [R-1:0] f, e_n;
  logic [2:0]   qp;
  logic [1:0]   qn, q;

  assign bext = {b, 1'b0};

  for (genvar r = 0; r < R; r++) begin : g_row
    rbbe2 #(.N(N)) u_rbbe2 (
      .a   (a),
      .bgrp(bext[4*r+4 : 4*r]),
      .xp  (xp[r]),
      .xn  (xn[r]),
      .f   (f[r]),
      .e_n (e_n[r])
    );
  end

  ecw_absorb u_absorb (
    .s0 (xp[0][N]),
    .y  (xn[R-1][1:0]),
    .f  (f[R-1]),
    .e_n(e_n[R-1]),
    .qp (qp),
    .qn (qn),
    .q  (q)
  );

  always_comb begin
    for (int r = 0; r < R; r++) begin
      pp_p[r] = W'(xp[r]) << (4 * r);
      pp_n[r] = W'(xn[r]) << (4 * r + 2);
      if (r > 0) begin
        // ECW of the row above, in this row's empty low digits
        pp_p[r][4*r-4] = f[r-1];
        pp_n[r][4*r-2] = e_n[r-1];
      end
    end
    // last ECW folded into row 0's sign bits and the last row's low bits
    pp_p[0][N+2:N]     = qp;
    pp_n[R-1][N-1:N-2] = qn;
    pp_n[R-1][N-3:N-4] = q;
  end

endmodule
