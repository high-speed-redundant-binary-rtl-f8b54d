// tb_redundant_binary_mul: end-to-end test of the RB multiplier.
//
// Four instances run side by side: the default one (N = 32, no parameter
// override, the full-size configuration), N = 8 checked exhaustively over
// all 65536 operand pairs, N = 16 (the width of the 16 x 16 example) and
// N = 64 (16 RB rows, four accumulation stages).  Every product is compared
// with the simulator's own signed multiplication.  The multiplier is purely
// combinational, so each result is checked one time step after the
// operands change (zero cycles of latency).
//
// The test also counts how often each mechanism of the design was
// exercised, recomputed from the operands: every Booth digit value (-2..2)
// in the last Booth group, both signs of the first row's Booth partial
// product, both values of the two corrections of the last row that are
// folded into other digits, and every re-coded value (2..5) of the first
// row's sign bits.  A mechanism that never happened counts as a failure.
module tb_redundant_binary_mul;

  int checks = 0, failures = 0;

  logic [7:0]   x8, y8;    logic [15:0]  p8;
  logic [15:0]  x16, y16;  logic [31:0]  p16;
  logic [31:0]  x32, y32;  logic [63:0]  p32;
  logic [63:0]  x64, y64;  logic [127:0] p64;

  redundant_binary_mul #(.N(8))  dut8  (.x(x8),  .y(y8),  .product(p8));
  redundant_binary_mul #(.N(16)) dut16 (.x(x16), .y(y16), .product(p16));
  redundant_binary_mul           dut32 (.x(x32), .y(y32), .product(p32));
  redundant_binary_mul #(.N(64)) dut64 (.x(x64), .y(y64), .product(p64));

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
    logic signed [7:0]  sx8, sy8;
    logic signed [15:0] sx16, sy16;
    logic signed [31:0] sx32, sy32;
    logic signed [63:0] sx64, sy64;
    logic [63:0] corner [8];

    // the example of the 16-bit waveform: 3 * 2 = 6
    x16 = 16'd3; y16 = 16'd2; #1;
    check("16-bit 3*2", {96'd0, p16}, 128'd6);

    // N = 8, every operand pair
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x8 = 8'(i); y8 = 8'(j); #1;
        sx8 = x8; sy8 = y8;
        check("N=8", {112'd0, p8}, {112'd0, 16'(32'(sx8) * 32'(sy8))});
        note(8, {56'd0, x8}, {56'd0, y8});
      end
    end

    // corner values for the wider instances
    corner = '{64'd0, 64'd1, {64{1'b1}}, 64'h8000_0000_0000_0000,
               64'h7fff_ffff_ffff_ffff, 64'h5555_5555_5555_5555,
               64'haaaa_aaaa_aaaa_aaaa, 64'h0123_4567_89ab_cdef};
    for (int i = 0; i < 8 + 2000; i++) begin
      for (int j = 0; j < ((i < 8) ? 8 : 1); j++) begin
        logic [63:0] ra, rb;
        if (i < 8) begin
          ra = corner[i]; rb = corner[j];
        end else begin
          ra = {$urandom, $urandom}; rb = {$urandom, $urandom};
        end
        // 16-bit operands take the sign bits of the 64-bit corners
        x16 = (i < 8) ? {ra[63], ra[14:0]} : ra[15:0];
        y16 = (i < 8) ? {rb[63], rb[14:0]} : rb[15:0];
        x32 = (i < 8) ? {ra[63], ra[30:0]} : ra[31:0];
        y32 = (i < 8) ? {rb[63], rb[30:0]} : rb[31:0];
        x64 = ra; y64 = rb;
        #1;
        sx16 = x16; sy16 = y16; sx32 = x32; sy32 = y32; sx64 = x64; sy64 = y64;
        check("N=16", {96'd0, p16}, {96'd0, 32'(64'(sx16) * 64'(sy16))});
        check("N=32", {64'd0, p32}, {64'd0, 64'(128'(sx32) * 128'(sy32))});
        check("N=64", p64, 128'($signed(128'(sx64)) * $signed(128'(sy64))));
        note(16, {48'd0, x16}, {48'd0, y16});
        note(32, {32'd0, x32}, {32'd0, y32});
        note(64, x64, y64);
      end
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
