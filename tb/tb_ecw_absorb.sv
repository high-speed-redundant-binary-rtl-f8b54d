// tb_ecw_absorb: exhaustive test of the last-row ECW folding.  For all 32
// input combinations the weighted value of the re-coded window must equal
// the value of the original window plus the correction word, in units of
// the weight of digit N-4:
//   val_in = 16*s0 + 32*s0 + 64*~s0 - 4*y0 - 8*y1 + f - 4*e_n
//   val_out  = 16*qp0 + 32*qp1 + 64*qp2 - 4*qn0 - 8*qn1 - q0 - 2*q1
module tb_ecw_absorb;
  int checks = 0, failures = 0;
  logic       s0, f, e_n;
  logic [1:0] y, qn, q;
  logic [2:0] qp;

  ecw_absorb dut (.s0(s0), .y(y), .f(f), .e_n(e_n), .qp(qp), .qn(qn), .q(q));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int val_in, val_out;
      {s0, y, f, e_n} = 5'(v);
      #1;
      val_in = 16 * s0 + 32 * s0 + 64 * (1 - s0) - 4 * y[0] - 8 * y[1] + f - 4 * e_n;
      val_out  = 16 * qp[0] + 32 * qp[1] + 64 * qp[2] - 4 * qn[0] - 8 * qn[1] - q[0] - 2 * q[1];
      checks++;
      if (val_in != val_out) begin
        failures++;
        $display("FAIL in=%b: val_in %0d val_out %0d", v[4:0], val_in, val_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
