// tb_rbmppg2: tests the RB partial product generator at the default width
// N = 32.  It must deliver exactly N/4 = 8 rows whose value, the sum of
// (positive bits - negative bits) over all rows taken modulo 2^64, equals
// the signed product A*B.  Corner operands and random ones are used.
module tb_rbmppg2;
  localparam int N = 32;

  int checks = 0, failures = 0;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] pp_p [N/4];
  logic [2*N-1:0] pp_n [N/4];

  rbmppg2 dut (.a(a), .b(b), .pp_p(pp_p), .pp_n(pp_n));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] corner [6];
    corner = '{32'd0, 32'd1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h5555_aaaa};
    for (int i = 0; i < 20036; i++) begin
      logic [2*N-1:0] sum, exp;
      a = (i < 36) ? corner[i / 6] : $urandom;
      b = (i < 36) ? corner[i % 6] : $urandom;
      #1;
      sum = '0;
      for (int r = 0; r < N / 4; r++) sum = sum + pp_p[r] - pp_n[r];
      exp = 64'(longint'($signed(a)) * longint'($signed(b)));
      checks++;
      if (sum != exp) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h: rows sum %h expected %h", a, b, sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
