// rb2nb: redundant binary to normal binary converter.
//
// The RB number is the difference of its positive and negative bit vectors,
// so the conversion is one W-bit subtraction, done as p + ~n + 1.  The adder
// is a hybrid of carry select and parallel prefix:
//   * the word is cut into W/BLK blocks of BLK bits; each block computes
//     its sum for a carry-in of 0 and of 1, and its block generate
//     (carry-out with carry-in 0) and propagate (all bit propagates);
//   * a Kogge-Stone prefix network over the block (G, P) pairs, with the
//     word's carry-in of 1, gives every block's carry-in in log2(W/BLK)
//     levels;
//   * each block's carry-in selects one of its two precomputed sums.
// The result is (p - n) mod 2^W.  The block size is this design's choice.
// Purely combinational.
module rb2nb #(
  parameter int W   = 64,  // digits / result bits
  parameter int BLK = 8    // carry-select block size, divides W
) (
  input  logic [W-1:0] rb_p,  // positive bits
  input  logic [W-1:0] rb_n,  // negative bits
  output logic [W-1:0] nb     // rb_p - rb_n, two's complement
);

  localparam int NB = W / BLK;
  localparam int LV = $clog2(NB);

  if (W % BLK != 0) begin : g_bad_blk
    $error("rb2nb: BLK must divide W");
  end

  logic [BLK-1:0] sum0 [NB];
  logic [BLK-1:0] sum1 [NB];
  logic [NB-1:0]  bg, bp;           // block generate / propagate
  logic [NB-1:0]  pg [LV+1];        // prefix generate per level
  logic [NB-1:0]  pp [LV+1];        // prefix propagate per level
  logic [NB-1:0]  cin;              // carry into each block

  always_comb begin
    for (int j = 0; j < NB; j++) begin
      logic [BLK-1:0] x, y;
      logic           c0;
      x = rb_p[j*BLK +: BLK];
      y = ~rb_n[j*BLK +: BLK];
      {c0, sum0[j]} = {1'b0, x} + {1'b0, y};
      sum1[j]       = x + y + BLK'(1);
      bg[j] = c0;
      bp[j] = &(x ^ y);
    end
    // Kogge-Stone prefix over the blocks
    pg[0] = bg;
    pp[0] = bp;
    for (int l = 0; l < LV; l++) begin
      for (int j = 0; j < NB; j++) begin
        if (j >= (1 << l)) begin
          pg[l+1][j] = pg[l][j] | (pp[l][j] & pg[l][j-(1<<l)]);
          pp[l+1][j] = pp[l][j] & pp[l][j-(1<<l)];
        end else begin
          pg[l+1][j] = pg[l][j];
          pp[l+1][j] = pp[l][j];
        end
      end
    end
    // word carry-in is 1 (the +1 of the two's complement negation)
    cin[0] = 1'b1;
    for (int j = 1; j < NB; j++) cin[j] = pg[LV][j-1] | pp[LV][j-1];
    for (int j = 0; j < NB; j++) nb[j*BLK +: BLK] = cin[j] ? sum1[j] : sum0[j];
  end

endmodule
