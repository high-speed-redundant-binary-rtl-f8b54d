// tb_booth_enc: exhaustive test of the radix-4 Booth encoder.  For each of
// the eight groups {b2,b1,b0} the digit selected by (one, two, neg) must be
// -2*b2 + b1 + b0, exactly one of one/two may be set for a non-zero digit,
// and the zero digit (groups 000 and 111) must not set neg.
module tb_booth_enc;
  import rbm_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0] grp;
  booth_sel_t sel;

  booth_enc dut (.grp(grp), .sel(sel));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int exp_d, got_d;
      grp = 3'(g);
      #1;
      exp_d = -2 * g[2] + g[1] + g[0];
      got_d = (sel.two ? 2 : (sel.one ? 1 : 0)) * (sel.neg ? -1 : 1);
      checks++;
      if (got_d != exp_d || (sel.one && sel.two) || (exp_d == 0 && (sel.neg || sel.one || sel.two))) begin
        failures++;
        $display("FAIL group %b: one=%b two=%b neg=%b", grp, sel.one, sel.two, sel.neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
