// tb_rb2nb: tests the RB-to-binary converter at the default 64 bits with
// random and corner inputs; the output must be rb_p - rb_n modulo 2^64.
// Corner inputs make the carry ripple through every block (all-propagate
// words) and produce 0 and the most negative value.
module tb_rb2nb;
  int checks = 0, failures = 0;
  logic [63:0] rb_p, rb_n, nb;

  rb2nb dut (.rb_p(rb_p), .rb_n(rb_n), .nb(nb));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] corner [6];
    corner = '{64'd0, 64'd1, '1, 64'h8000_0000_0000_0000, 64'h00ff_00ff_00ff_00ff,
               64'h7fff_ffff_ffff_ffff};
    for (int i = 0; i < 20036; i++) begin
      rb_p = (i < 36) ? corner[i / 6] : {$urandom, $urandom};
      rb_n = (i < 36) ? corner[i % 6] : {$urandom, $urandom};
      #1;
      checks++;
      if (nb != rb_p - rb_n) begin
        failures++;
        if (failures < 10) $display("FAIL %h - %h: got %h", rb_p, rb_n, nb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
