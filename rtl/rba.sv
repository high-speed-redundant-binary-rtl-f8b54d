// rba: RB partial product accumulation block (RBA).
//
// Adds two W-digit redundant binary rows, carry-free, into one W-digit row.
// Digit positions FA_LO .. FA_HI, where both rows can hold digits, use an
// RB full adder cell (rbfa); all other positions use an RB half adder cell
// (rbha) fed with whichever row has a digit there (the two rows' bits are
// ORed; the caller guarantees that at most one of them is non-zero outside
// FA_LO .. FA_HI, and a deferred assertion checks it).  Each cell passes
// one carry digit and one "non-negative" lookahead bit to the cell above,
// so the delay does not depend on W.  The
// carry out of the top digit is dropped: the result is the sum modulo 2^W,
// which is all a 2N-bit product needs, so the top cell's carry and
// lookahead outputs drive nothing.  Purely combinational.
module rba
  import rbm_pkg::*;
#(
  parameter int W     = 64,     // digits per row
  parameter int FA_LO = 0,      // lowest digit with a full adder cell
  parameter int FA_HI = W - 1   // highest digit with a full adder cell
) (
  input  logic [W-1:0] a_p, a_n,  // first row, positive / negative bits
  input  logic [W-1:0] b_p, b_n,  // second row
  output logic [W-1:0] s_p, s_n   // sum row
);

  // Outside FA_LO .. FA_HI the half adder cells see the OR of both rows, so
  // at most one row may have a non-zero digit there.
  logic [W-1:0] fa_mask;
  always_comb begin
    for (int i = 0; i < W; i++) fa_mask[i] = (i >= FA_LO && i <= FA_HI);
  end
  always_comb begin
    assert final (((a_p | a_n) & (b_p | b_n) & ~fa_mask) == '0)
      else $error("rba: both rows have digits outside the full adder range");
  end

  // Each digit position keeps its own carry and lookahead outputs; the
  // position above reads them through the generate scope of the one below.
  for (genvar i = 0; i < W; i++) begin : g_digit
    rb_digit_t s, c_out, c_in;
    logic      h_out, h_in;
    if (i == 0) begin : g_first
      assign h_in = 1'b1;
      assign c_in = '0;
    end else begin : g_next
      assign h_in = g_digit[i-1].h_out;
      assign c_in = g_digit[i-1].c_out;
    end
    if (i >= FA_LO && i <= FA_HI) begin : g_fa
      rbfa u_rbfa (
        .a    ('{p: a_p[i], n: a_n[i]}),
        .b    ('{p: b_p[i], n: b_n[i]}),
        .h_in (h_in),
        .c_in (c_in),
        .s    (s),
        .c_out(c_out),
        .h_out(h_out)
      );
    end else begin : g_ha
      rbha u_rbha (
        .a    ('{p: a_p[i] | b_p[i], n: a_n[i] | b_n[i]}),
        .h_in (h_in),
        .c_in (c_in),
        .s    (s),
        .c_out(c_out),
        .h_out(h_out)
      );
    end
    assign s_p[i] = s.p;
    assign s_n[i] = s.n;
  end

endmodule
