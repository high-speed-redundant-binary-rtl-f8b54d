// rbpp_tree: RB partial product reduction tree (RBPA).
//
// Sums the N/4 redundant binary partial product rows of rbmppg2 with a
// binary tree of rba blocks: log2(N/4) accumulation stages (three for
// N = 32, four for N = 64), each halving the number of rows.  Every rba is
// given the digit range where both of its input rows can be non-zero (from
// the row spans in rbm_pkg), so it uses full adder cells there and half
// adder cells elsewhere.  Because RB addition is carry-free, each stage has
// the delay of a few gates whatever N is.  Purely combinational.
module rbpp_tree
  import rbm_pkg::*;
#(
  parameter int N = 32  // operand width; N/4 rows of 2N digits
) (
  input  logic [2*N-1:0] pp_p [N/4],  // positive bits of the rows
  input  logic [2*N-1:0] pp_n [N/4],  // negative bits of the rows
  output logic [2*N-1:0] sum_p,       // positive bits of the sum
  output logic [2*N-1:0] sum_n        // negative bits of the sum
);

  localparam int R  = N / 4;
  localparam int W  = 2 * N;
  localparam int LV = $clog2(R);

  // Stage l adds pairs of the rows left by stage l-1 (stage 0: the inputs).
  for (genvar l = 0; l < LV; l++) begin : g_stage
    for (genvar i = 0; i < (R >> (l + 1)); i++) begin : g_rba
      logic [W-1:0] a_p, a_n, b_p, b_n, s_p, s_n;
      if (l == 0) begin : g_from_rows
        assign a_p = pp_p[2*i];
        assign a_n = pp_n[2*i];
        assign b_p = pp_p[2*i+1];
        assign b_n = pp_n[2*i+1];
      end else begin : g_from_stage
        assign a_p = g_stage[l-1].g_rba[2*i].s_p;
        assign a_n = g_stage[l-1].g_rba[2*i].s_n;
        assign b_p = g_stage[l-1].g_rba[2*i+1].s_p;
        assign b_n = g_stage[l-1].g_rba[2*i+1].s_n;
      end
      rba #(
        .W    (W),
        .FA_LO(node_lo(l, 2 * i + 1)),
        .FA_HI(node_hi(l, 2 * i, N))
      ) u_rba (
        .a_p(a_p), .a_n(a_n), .b_p(b_p), .b_n(b_n), .s_p(s_p), .s_n(s_n)
      );
    end
  end

  assign sum_p = g_stage[LV-1].g_rba[0].s_p;
  assign sum_n = g_stage[LV-1].g_rba[0].s_n;

endmodule
