// tb_rbfa: exhaustive test of the RB full adder cell.  Every code of the two
// input digits (including (1,1) for zero), both lookahead values and every
// incoming carry the lookahead allows (h_in = 1: carry 0 or +1; h_in = 0:
// carry 0 or -1) is applied.  Checked: a + b + c_in = 2*c_out + s, the sum
// and carry use canonical codes, the carry obeys the lookahead rule towards
// the next position (h_out = 1 -> c_out >= 0, h_out = 0 -> c_out <= 0), and
// h_out is 1 exactly when both digits are non-negative.
module tb_rbfa;
  import rbm_pkg::*;

  int checks = 0, failures = 0;
  rb_digit_t a, b, c_in, s, c_out;
  logic      h_in, h_out;

  rbfa dut (.a(a), .b(b), .h_in(h_in), .c_in(c_in), .s(s), .c_out(c_out), .h_out(h_out));

  function automatic int val(rb_digit_t d);
    return int'(d.p) - int'(d.n);
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int cv;
      {a, b, h_in, c_in} = 7'(v);
      if (c_in == 2'b11) continue;
      cv = val(c_in);
      if (h_in && cv < 0) continue;
      if (!h_in && cv > 0) continue;
      #1;
      checks++;
      if (val(a) + val(b) + cv != 2 * val(c_out) + val(s) || s == 2'b11 || c_out == 2'b11
          || (h_out && val(c_out) < 0) || (!h_out && val(c_out) > 0)
          || h_out != (val(a) >= 0 && val(b) >= 0)) begin
        failures++;
        $display("FAIL a=%b b=%b h=%b c=%b: s=%b c_out=%b h_out=%b", a, b, h_in, c_in, s, c_out, h_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
