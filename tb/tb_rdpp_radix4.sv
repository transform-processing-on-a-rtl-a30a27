// tb_rdpp_radix4: runs a radix-4 FFT butterfly on the processor at its
// default size and checks every output.
//
// Inputs enter through element 0, one word per clock, in the order
// x0 y0 x2 y2 x1 y1 x3 y3 sin(a) cos(a) sin(b) cos(b) sin(c) cos(c)
// (h(n) = x(n) + j y(n); a, b, c are the twiddle angles of outputs 1, 2, 3).
// The 16-instruction program forms the sums and differences
//   r0 = x0+x2+x1+x3           s0 = y0+y2+y1+y3            -> X(0), Y(0)
//   r3 = x0-x2+y1-y3           s3 = y0-y2-x1+x3
//   r2 = x0+x2-x1-x3           s2 = y0+y2-y1-y3
//   r1 = x0-x2-y1+y3           s1 = y0-y2+x1-x3
// and multiplies (r + j s) by (cos - j sin):
//   X(k) = r cos + s sin,   Y(k) = s cos - r sin
// with (r3,s3,a) for k=1, (r2,s2,b) for k=2, (r1,s1,c) for k=3. A product
// cannot be subtracted, so element 11 forms -sin each time a sine arrives.
// Element map: E1 r0/X0, E2 r1, E3 r2, E4 r3, E5 s0/Y0, E6 s1, E7 s2,
// E8 s3, E9 X1, E10 Y1, E12 X2, E13 Y2, E14 X3, E15 Y3, E11 -sin.
// Data format: inputs |x|,|y| < 0.25 and twiddles as 1/0/31 fractions; the
// sums stay 1/0/31 and the twiddled outputs are 2/0/30 (the product's extra
// sign bit is kept, no shift). The program loops, one butterfly per 16
// clocks; outputs are compared bit-exactly with a fixed-point reference and
// with a floating-point radix-4 DFT, and the rate is checked.
module tb_rdpp_radix4;
  import rdpp_pkg::*;
  import rdpp_asm_pkg::*;

  localparam int NB = 12, PLEN = 16, N = 16;

  logic clk = 0, rst_n = 0;
  logic prog_we = 0;
  logic [5:0] prog_addr = '0;
  logic [3:0] prog_dpe = '0;
  dpe_ctrl_t prog_data = '0;
  logic start = 0, stop = 0;
  logic [5:0] loop_start = '0, loop_end = 6'(PLEN - 1);
  logic exec_valid, loop_wrap;
  logic [5:0] exec_addr;
  logic [31:0] data_in;
  logic [N-1:0][31:0] bus;

  rdpp_top dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_dpe, .prog_data,
                .start, .stop, .loop_start, .loop_end, .exec_valid, .exec_addr, .loop_wrap,
                .data_in, .bus_o(bus));

  int checks = 0, failures = 0;
  dpe_ctrl_t prog [PLEN][N];
  logic [31:0] smp [NB + 1][14];
  int iter = 0, results = 0;
  longint cyc = 0, last = -1;

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb data_in = (exec_valid && exec_addr < 14) ? smp[iter][exec_addr] : 32'h0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (exec_valid && exec_addr == 6'(PLEN - 1)) iter <= iter + 1;
  end

  function automatic logic [31:0] hmul(logic [31:0] x, logic [31:0] y);
    longint p;
    p = longint'($signed(x[31:16])) * longint'($signed(y[31:16]));
    return p[31:0];
  endfunction
  function automatic real fx(logic [31:0] v, int frac);
    return real'($signed(v)) / real'(64'd1 << frac);
  endfunction

  // one instruction: out = A*B + C +/- D
  function automatic dpe_ctrl_t op(int a, int b, int c, int d, bit sub);
    bit ok;
    dpe_ctrl_t f;
    f = asm_dpe(1, a, b, c, d, sub, SH_NONE, OP_NONE, OP_NONE, ok);
    if (!ok) $display("program conflict");
    return f;
  endfunction
  localparam int X = OP_NONE;

  task automatic chk(logic [31:0] got, logic [31:0] exp, real approx, int frac, string what, int b);
    real err;
    checks++;
    if (got !== exp) begin failures++; $display("FAIL bfly %0d %s got %h exp %h", b, what, got, exp); end
    err = fx(got, frac) - approx;
    if (err < 0) err = -err;
    checks++;
    if (err > 1.0 / 2048.0) begin
      failures++; $display("FAIL bfly %0d %s = %f, DFT %f", b, what, fx(got, frac), approx);
    end
  endtask

  task automatic check_results(int b);
    logic [31:0] x0, y0, x1, y1, x2, y2, x3, y3, sa, ca, sb, cb, sc, cc;
    logic [31:0] r0, r1, r2, r3, s0, s1, s2, s3;
    real hr [4], hi [4], tc [4], ts [4], dr, di;
    {x0, y0, x2, y2, x1, y1, x3, y3} = {smp[b][0], smp[b][1], smp[b][2], smp[b][3],
                                         smp[b][4], smp[b][5], smp[b][6], smp[b][7]};
    {sa, ca, sb, cb, sc, cc} = {smp[b][8], smp[b][9], smp[b][10], smp[b][11], smp[b][12], smp[b][13]};
    r0 = x0 + x2 + x1 + x3;  s0 = y0 + y2 + y1 + y3;
    r3 = x0 - x2 + y1 - y3;  s3 = y0 - y2 - x1 + x3;
    r2 = x0 + x2 - x1 - x3;  s2 = y0 + y2 - y1 - y3;
    r1 = x0 - x2 - y1 + y3;  s1 = y0 - y2 + x1 - x3;
    // floating-point 4-point DFT, H(k) = sum h(n) e^{-j 2 pi n k / 4}
    hr[0] = fx(x0,31)+fx(x1,31)+fx(x2,31)+fx(x3,31); hi[0] = fx(y0,31)+fx(y1,31)+fx(y2,31)+fx(y3,31);
    hr[1] = fx(x0,31)+fx(y1,31)-fx(x2,31)-fx(y3,31); hi[1] = fx(y0,31)-fx(x1,31)-fx(y2,31)+fx(x3,31);
    hr[2] = fx(x0,31)-fx(x1,31)+fx(x2,31)-fx(x3,31); hi[2] = fx(y0,31)-fx(y1,31)+fx(y2,31)-fx(y3,31);
    hr[3] = fx(x0,31)-fx(y1,31)-fx(x2,31)+fx(y3,31); hi[3] = fx(y0,31)+fx(x1,31)-fx(y2,31)-fx(x3,31);
    tc[1] = fx(ca,31); ts[1] = fx(sa,31); tc[2] = fx(cb,31); ts[2] = fx(sb,31);
    tc[3] = fx(cc,31); ts[3] = fx(sc,31);
    chk(bus[1], r0, hr[0], 31, "X0", b);
    chk(bus[5], s0, hi[0], 31, "Y0", b);
    chk(bus[9],  hmul(ca, r3) + hmul(sa, s3), hr[1]*tc[1] + hi[1]*ts[1], 30, "X1", b);
    chk(bus[10], hmul(-sa, r3) + hmul(ca, s3), hi[1]*tc[1] - hr[1]*ts[1], 30, "Y1", b);
    chk(bus[12], hmul(cb, r2) + hmul(sb, s2), hr[2]*tc[2] + hi[2]*ts[2], 30, "X2", b);
    chk(bus[13], hmul(-sb, r2) + hmul(cb, s2), hi[2]*tc[2] - hr[2]*ts[2], 30, "Y2", b);
    chk(bus[14], hmul(cc, r1) + hmul(sc, s1), hr[3]*tc[3] + hi[3]*ts[3], 30, "X3", b);
    chk(bus[15], hmul(-sc, r1) + hmul(cc, s1), hi[3]*tc[3] - hr[3]*ts[3], 30, "Y3", b);
  endtask

  initial begin
    for (int a = 0; a < PLEN; a++) for (int e = 0; e < N; e++) prog[a][e] = '0;
    for (int a = 0; a < 14; a++) prog[a][0] = op(X, X, 0, X, 0);           // IN
    prog[1][1]  = op(X, X, 0, X, 0);   prog[1][2]  = op(X, X, 0, X, 0);      // x0
    prog[2][5]  = op(X, X, 0, X, 0);   prog[2][6]  = op(X, X, 0, X, 0);      // y0
    prog[3][1]  = op(X, X, 1, 0, 0);   prog[3][2]  = op(X, X, 2, 0, 1);      // x2
    prog[4][5]  = op(X, X, 5, 0, 0);   prog[4][6]  = op(X, X, 6, 0, 1);      // y2
    prog[5][3]  = op(X, X, 1, 0, 1);   prog[5][1]  = op(X, X, 1, 0, 0);      // x1
    prog[5][8]  = op(X, X, 6, 0, 1);   prog[5][6]  = op(X, X, 6, 0, 0);
    prog[6][5]  = op(X, X, 5, 0, 0);   prog[6][7]  = op(X, X, 5, 0, 1);      // y1
    prog[6][4]  = op(X, X, 2, 0, 0);   prog[6][2]  = op(X, X, 2, 0, 1);
    prog[7][1]  = op(X, X, 1, 0, 0);   prog[7][3]  = op(X, X, 3, 0, 1);      // x3
    prog[7][8]  = op(X, X, 8, 0, 0);   prog[7][6]  = op(X, X, 6, 0, 1);
    prog[8][5]  = op(X, X, 5, 0, 0);   prog[8][2]  = op(X, X, 2, 0, 0);      // y3
    prog[8][4]  = op(X, X, 4, 0, 1);   prog[8][7]  = op(X, X, 7, 0, 1);
    prog[9][9]  = op(0, 8, X, X, 0);   prog[9][11] = op(X, X, X, 0, 1);      // sin a
    prog[10][9] = op(0, 4, 9, X, 0);   prog[10][10] = op(0, 8, X, X, 0);     // cos a
    prog[11][10] = op(11, 4, 10, X, 0);                                     // sin b
    prog[11][11] = op(X, X, X, 0, 1);  prog[11][12] = op(0, 7, X, X, 0);
    prog[12][12] = op(0, 3, 12, X, 0); prog[12][13] = op(0, 7, X, X, 0);    // cos b
    prog[13][13] = op(11, 3, 13, X, 0);                                     // sin c
    prog[13][11] = op(X, X, X, 0, 1);  prog[13][14] = op(0, 6, X, X, 0);
    prog[14][14] = op(0, 2, 14, X, 0); prog[14][15] = op(0, 6, X, X, 0);    // cos c
    prog[15][15] = op(11, 2, 15, X, 0);

    for (int b = 0; b <= NB; b++) begin
      for (int k = 0; k < 8; k++) smp[b][k] = 32'($signed($urandom) >>> 3);
      for (int k = 0; k < 3; k++) begin
        real ang;
        ang = 2.0 * 3.14159265358979 * real'((b + 1) * (k + 1) % 64) / 64.0;
        smp[b][8 + 2*k] = 32'($rtoi($sin(ang) * 0.99996 * 2147483648.0));
        smp[b][9 + 2*k] = 32'($rtoi($cos(ang) * 0.99996 * 2147483648.0));
      end
    end

    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int a = 0; a < PLEN; a++)
      for (int e = 0; e < N; e++) begin
        prog_we = 1; prog_addr = 6'(a); prog_dpe = 4'(e); prog_data = prog[a][e];
        @(negedge clk);
      end
    prog_we = 0;
    start = 1; @(negedge clk); start = 0;
    while (results < NB) begin
      @(negedge clk);
      if (exec_valid && exec_addr == 0 && iter > 0) begin
        check_results(iter - 1);
        if (last >= 0) begin
          checks++;
          if (cyc - last != PLEN) begin failures++; $display("FAIL rate %0d", cyc - last); end
        end
        last = cyc;
        results++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
