// tb_rbm_full: full-size test of the RB multiplier, one instance at its
// default width (N = 32: 8 RB partial product rows, three accumulation
// stages, a 64-bit RB-to-binary converter), parameters left alone.  It runs
// the operand pair 3 * 2, corner values (0, 1, -1, the most negative and
// most positive numbers, alternating patterns) and 20000 random pairs, and
// compares each product with the simulator's own signed multiplication.
// The multiplier has no registers: each product is checked one time step
// after its operands are applied.  As in the end-to-end test, it counts how
// often each mechanism happened (every Booth digit value of the top group,
// both signs of the first row, both values of the two folded corrections,
// every re-coded value of the first row's sign bits) and fails if one never
// did.
module tb_rbm_full;

  int checks = 0, failures = 0;

  logic [31:0] x32, y32;
  logic [63:0] p32;

  redundant_binary_mul dut (.x(x32), .y(y32), .product(p32));

  // mechanism counters, indexed as described above
  int last_digit [5];   // Booth digit of the top group, +2 as index
  int sign0 [2];        // sign of the first row's Booth partial product
  int last_f [2];       // correction bit of the last row's low product
  int last_e [2];       // correction bit of the last row's high product
  int qp_val [6];       // re-coded first-row sign bits, value 0..5

  // Independent model of the mechanisms for an N-bit operand pair.
  task automatic note(int n, logic [63:0] a, logic [63:0] b);
    int g2, g1, g0, d, neg0, neg1, negl, s0, t, y0, y1;
    logic [64:0] bx;
    bx = {b, 1'b0};
    // top Booth group (b[n-1], b[n-2], b[n-3])
    g2 = int'(bx[n]); g1 = int'(bx[n-1]); g0 = int'(bx[n-2]);
    d = -2 * g2 + g1 + g0;
    last_digit[d+2]++;
    negl = (g2 == 1 && !(g1 == 1 && g0 == 1)) ? 1 : 0;
    last_e[negl]++;
    // second to top group, the last row's low product
    g2 = int'(bx[n-2]); g1 = int'(bx[n-3]); g0 = int'(bx[n-4]);
    neg1 = (g2 == 1 && !(g1 == 1 && g0 == 1)) ? 1 : 0;
    last_f[neg1]++;
    // sign of the first Booth product: d0*A < 0, or A = 0 with d0 < 0
    g2 = int'(bx[2]); g1 = int'(bx[1]); g0 = int'(bx[0]);
    d = -2 * g2 + g1 + g0;
    neg0 = (g2 == 1 && !(g1 == 1 && g0 == 1)) ? 1 : 0;
    // sign bit of the (N+1)-bit product: A's sign, inverted for d < 0
    s0 = (d == 0) ? 0 : (int'(a[n-1]) ^ neg0);
    sign0[s0]++;
    // window value of the folded correction, bits of the top Booth product
    begin
      logic [64:0] ax, m;
      int one, two;
      ax = {a[63], a};
      ax = ax & ((65'd1 << (n + 1)) - 1);
      if (n < 64) ax[n] = a[n-1];
      g2 = int'(bx[n]); g1 = int'(bx[n-1]); g0 = int'(bx[n-2]);
      one = g1 ^ g0;
      two = (g2 & ~g1 & ~g0) | (~g2 & g1 & g0);
      m = (one != 0) ? ax : ((two != 0) ? (ax << 1) : 65'd0);
      if (negl == 1) m = ~m;
      y0 = m[0] ? 0 : 1;   // the row stores the inverted bits
      y1 = m[1] ? 0 : 1;
      t = ((s0 != 0) ? 48 : 64) - 4 * y0 - 8 * y1 + neg1 - 4 * (1 - negl);
      qp_val[(t + 15) / 16]++;
    end
  endtask

  task automatic check(string tag, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", tag, got, exp);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [31:0] sx32, sy32;
    logic [31:0] corner [8];

    x32 = 32'd3; y32 = 32'd2; #1;
    check("3*2", {64'd0, p32}, 128'd6);

    corner = '{32'd0, 32'd1, '1, 32'h8000_0000, 32'h7fff_ffff, 32'h5555_5555,
               32'haaaa_aaaa, 32'h89ab_cdef};
    for (int i = 0; i < 64 + 20000; i++) begin
      x32 = (i < 64) ? corner[i / 8] : $urandom;
      y32 = (i < 64) ? corner[i % 8] : $urandom;
      #1;
      sx32 = x32; sy32 = y32;
      check("N=32", {64'd0, p32}, {64'd0, 64'(longint'(sx32) * longint'(sy32))});
      note(32, {32'd0, x32}, {32'd0, y32});
    end

    // every mechanism must have happened
    for (int d = 0; d < 5; d++) begin
      $display("last Booth digit %0d: %0d times", d - 2, last_digit[d]);
      if (last_digit[d] == 0) failures++;
    end
    for (int v = 0; v < 2; v++) begin
      $display("first-row sign %0d: %0d, last-row low correction %0d: %0d, high correction %0d: %0d",
               v, sign0[v], v, last_f[v], v, last_e[v]);
      if (sign0[v] == 0 || last_f[v] == 0 || last_e[v] == 0) failures++;
    end
    for (int v = 2; v < 6; v++) begin
      $display("re-coded first-row sign bits = %0d: %0d times", v, qp_val[v]);
      if (qp_val[v] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
