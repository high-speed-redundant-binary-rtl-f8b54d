// redundant_binary_mul: N x N two's complement multiplier built on
// redundant binary (RB) arithmetic.
//
// Three combinational stages, as in the block diagram of the design:
//   1. rbmppg2   radix-4 Booth encoding of y; pairs of Booth partial products
//                become N/4 RB partial product rows, with the error-correcting
//                word of the last row folded into existing digits, so no
//                (N/4+1)-th row is needed;
//   2. rbpp_tree log2(N/4) stages of carry-free RB accumulation (three for
//                the default N = 32);
//   3. rb2nb     one 2N-bit subtraction (positive minus negative bits) with a
//                carry-select / parallel-prefix adder.
// x is the multiplicand and y the multiplier; product = x * y exactly, as a
// 2N-bit two's complement number.  There are no registers: the product is
// valid one combinational delay after the operands.  N must be a power of
// two and at least 8.
module redundant_binary_mul #(
  parameter int N = 32  // operand width
) (
  input  logic [N-1:0]   x,        // multiplicand
  input  logic [N-1:0]   y,        // multiplier
  output logic [2*N-1:0] product   // x * y
);

  logic [2*N-1:0] pp_p [N/4];
  logic [2*N-1:0] pp_n [N/4];
  logic [2*N-1:0] sum_p, sum_n;

  rbmppg2 #(.N(N)) u_rbmppg2 (
    .a   (x),
    .b   (y),
    .pp_p(pp_p),
    .pp_n(pp_n)
  );

  rbpp_tree #(.N(N)) u_tree (
    .pp_p (pp_p),
    .pp_n (pp_n),
    .sum_p(sum_p),
    .sum_n(sum_n)
  );

  rb2nb #(.W(2 * N)) u_rb2nb (
    .rb_p(sum_p),
    .rb_n(sum_n),
    .nb  (product)
  );

endmodule
