// tb_rba: tests the RB accumulation block at the default 64 digits.
// Two instances: one with full adder cells everywhere, fed with random RB
// rows (every digit code, (1,1) included); one with full adder cells only
// at digits 8 .. 40, fed with a first row that is zero above digit 40 and a
// second row that is zero below digit 8.  In both, the sum row's value
// (positive - negative bits, modulo 2^64) must equal the sum of the input
// rows' values, and every sum digit must use a canonical code.
module tb_rba;
  int checks = 0, failures = 0;
  logic [63:0] a_p, a_n, b_p, b_n, s_p, s_n;
  logic [63:0] c_p, c_n, d_p, d_n, t_p, t_n;

  rba dut_full (.a_p(a_p), .a_n(a_n), .b_p(b_p), .b_n(b_n), .s_p(s_p), .s_n(s_n));
  rba #(.W(64), .FA_LO(8), .FA_HI(40)) dut_part (
    .a_p(c_p), .a_n(c_n), .b_p(d_p), .b_n(d_n), .s_p(t_p), .s_n(t_n));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [63:0] lo_mask, hi_mask;
      a_p = {$urandom, $urandom}; a_n = {$urandom, $urandom};
      b_p = {$urandom, $urandom}; b_n = {$urandom, $urandom};
      if (i % 4 == 1) begin a_n = '0; b_n = '0; end   // long runs of +1
      if (i % 4 == 2) begin a_p = '0; b_p = '0; end   // long runs of -1
      lo_mask = (64'd1 << 41) - 1;
      hi_mask = ~((64'd1 << 8) - 1);
      c_p = a_p & lo_mask; c_n = a_n & lo_mask;
      d_p = b_p & hi_mask; d_n = b_n & hi_mask;
      #1;
      checks++;
      if (s_p - s_n != (a_p - a_n) + (b_p - b_n) || (s_p & s_n) != 0) begin
        failures++;
        if (failures < 10) $display("FAIL full: %h %h + %h %h -> %h %h", a_p, a_n, b_p, b_n, s_p, s_n);
      end
      checks++;
      if (t_p - t_n != (c_p - c_n) + (d_p - d_n) || (t_p & t_n) != 0) begin
        failures++;
        if (failures < 10) $display("FAIL part: %h %h + %h %h -> %h %h", c_p, c_n, d_p, d_n, t_p, t_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
