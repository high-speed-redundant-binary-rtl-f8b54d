// tb_rbpp_tree: tests the RB reduction tree at the default N = 32 (8 rows of
// 64 digits, three accumulation stages).  Each row gets random digits inside
// the span the generator can fill (row r: digits 4r-4 .. 4r+N+2, row 0 from
// digit 0), and the tree's result, positive minus negative bits modulo
// 2^64, must equal the sum of the rows' values.
module tb_rbpp_tree;
  localparam int N = 32;
  localparam int R = N / 4;

  int checks = 0, failures = 0;
  logic [2*N-1:0] pp_p [R];
  logic [2*N-1:0] pp_n [R];
  logic [2*N-1:0] sum_p, sum_n;

  rbpp_tree dut (.pp_p(pp_p), .pp_n(pp_n), .sum_p(sum_p), .sum_n(sum_n));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [2*N-1:0] exp, mask;
      exp = '0;
      for (int r = 0; r < R; r++) begin
        int lo, hi;
        lo = (r == 0) ? 0 : 4 * r - 4;
        hi = (4 * r + N + 2 > 2 * N - 1) ? 2 * N - 1 : 4 * r + N + 2;
        mask = ((64'd1 << (hi - lo + 1)) - 1) << lo;
        pp_p[r] = {$urandom, $urandom} & mask;
        pp_n[r] = {$urandom, $urandom} & mask;
        if (i % 3 == 1) pp_n[r] = '0;
        if (i % 3 == 2) pp_p[r] = '0;
        exp = exp + pp_p[r] - pp_n[r];
      end
      #1;
      checks++;
      if (sum_p - sum_n != exp) begin
        failures++;
        if (failures < 10) $display("FAIL: got %h expected %h", sum_p - sum_n, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
