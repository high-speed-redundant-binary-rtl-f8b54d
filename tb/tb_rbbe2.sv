// tb_rbbe2: tests one RB partial product row at the default width N = 32.
// For random and corner multiplicands and every 5-bit multiplier slice, the
// row value xp - 4*xn + f - 4*e_n (xp, xn read as unsigned numbers) must be
// exactly (d0 + 4*d1) * A, with d0, d1 the Booth digits of the slice.
module tb_rbbe2;
  localparam int N = 32;

  int checks = 0, failures = 0;
  logic [N-1:0] a;
  logic [4:0]   bgrp;
  logic [N+2:0] xp;
  logic [N:0]   xn;
  logic         f, e_n;

  rbbe2 dut (.a(a), .bgrp(bgrp), .xp(xp), .xn(xn), .f(f), .e_n(e_n));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] corner [5];
    corner = '{32'd0, 32'd1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff};
    for (int i = 0; i < 300; i++) begin
      a = (i < 5) ? corner[i] : $urandom;
      for (int g = 0; g < 32; g++) begin
        longint d0, d1, got, exp;
        bgrp = 5'(g);
        #1;
        d0 = -2 * g[2] + g[1] + g[0];
        d1 = -2 * g[4] + g[3] + g[2];
        exp = (d0 + 4 * d1) * longint'($signed(a));
        got = longint'(xp) - 4 * longint'(xn) + longint'(f) - 4 * longint'(e_n);
        checks++;
        if (got != exp) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%b: got %0d expected %0d", a, bgrp, got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
