// tb_rdpp_fft: complex FFTs of N = 16, 256, 1024, 4096 and 65536 points on the
// processor at its default size, built from radix-4 passes.
//
// The processor runs a looped 16-instruction radix-4 butterfly program (the
// one of tb_rdpp_radix4, plus arithmetic right shifts so that every output
// of a pass is scaled by 1/4). The testbench plays the host: it holds the
// data set between passes and streams each butterfly's 14 words, in the
// order x0 y0 x2 y2 x1 y1 x3 y3 sin(a) cos(a) sin(b) cos(b) sin(c) cos(c),
// back to back, one butterfly per 16 clocks. The passes are the iterative
// decimation-in-frequency radix-4 FFT:
//   for len = N, N/4, ..., 4:  q = len/4
//     for each block base, for j = 0 .. q-1:
//       inputs  base+j, base+j+q, base+j+2q, base+j+3q
//       twiddle of output k: W_len^(j k) = cos(2 pi j k / len) - j sin(...)
//       outputs written back to base+j+k q
// which leaves X(m) at the position whose base-4 digits are those of m
// reversed. X(0), Y(0) are halved twice; the twiddled outputs are 2/0/30
// products shifted right once, so read as 1/0/31 words they are value/4.
// The result is DFT / N. Inputs carry guard sign bits so that no sum of
// four can overflow in any pass: a pass can grow a component by up to
// 4 * sqrt(2) / 4, so N = 16, 256, 1024, 4096, 65536 use 3, 4, 5, 5, 6 guard
// bits.
//
// Checks: every butterfly's eight outputs bit-exactly against a fixed-point
// reference; up to 64 output bins against a floating-point DFT / N within
// 2^-14; and a processing time of exactly 16 clocks per butterfly,
// 16 x (N/4) x log4(N) clocks in all.
module tb_rdpp_fft;
  import rdpp_pkg::*;
  import rdpp_asm_pkg::*;

  localparam int PLEN = 16, N_E = 16, NMAX = 65536;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic prog_we = 0;
  logic [5:0] prog_addr = '0;
  logic [3:0] prog_dpe = '0;
  dpe_ctrl_t prog_data = '0;
  logic start = 0, stop = 0;
  logic [5:0] loop_start = '0, loop_end = 6'(PLEN - 1);
  logic exec_valid, loop_wrap;
  logic [5:0] exec_addr;
  logic [31:0] data_in = '0;
  logic [N_E-1:0][31:0] bus;

  rdpp_top dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_dpe, .prog_data,
                .start, .stop, .loop_start, .loop_end, .exec_valid, .exec_addr, .loop_wrap,
                .data_in, .bus_o(bus));

  int checks = 0, failures = 0;
  dpe_ctrl_t prog [PLEN][N_E];
  logic [31:0] dre [NMAX], dim [NMAX];     // data set held by the host
  logic [31:0] h0re [NMAX], h0im [NMAX];   // original input
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] hmul(logic [31:0] x, logic [31:0] y);
    longint p;
    p = longint'($signed(x[31:16])) * longint'($signed(y[31:16]));
    return p[31:0];
  endfunction
  function automatic logic [31:0] q31(real r);
    real v;
    v = r * 2147483647.0;
    return 32'($rtoi(v < 0 ? v - 0.5 : v + 0.5));
  endfunction

  function automatic dpe_ctrl_t op(int a, int b, int c, int d, bit sub, int sh = SH_NONE);
    bit ok;
    dpe_ctrl_t f;
    f = asm_dpe(1, a, b, c, d, sub, sh, OP_NONE, OP_NONE, ok);
    if (!ok) $display("program conflict");
    return f;
  endfunction
  localparam int X = OP_NONE;

  function automatic logic [31:0] sra1(logic [31:0] v);
    return 32'($signed(v) >>> 1);
  endfunction

  // fixed-point reference of one butterfly: w = 14 input words, o = outputs
  // (X0 Y0 X1 Y1 X2 Y2 X3 Y3)
  function automatic void bfly_ref(input logic [31:0] w [14], output logic [31:0] o [8]);
    logic [31:0] x0, y0, x2, y2, x1, y1, x3, y3, r0, r1, r2, r3, s0, s1, s2, s3;
    {x0, y0, x2, y2, x1, y1, x3, y3} = {w[0], w[1], w[2], w[3], w[4], w[5], w[6], w[7]};
    r0 = x0 + x2 + x1 + x3;  s0 = y0 + y2 + y1 + y3;
    r3 = x0 - x2 + y1 - y3;  s3 = y0 - y2 - x1 + x3;
    r2 = x0 + x2 - x1 - x3;  s2 = y0 + y2 - y1 - y3;
    r1 = x0 - x2 - y1 + y3;  s1 = y0 - y2 + x1 - x3;
    o[0] = 32'($signed(r0) >>> 2);
    o[1] = 32'($signed(s0) >>> 2);
    o[2] = sra1(hmul(w[9], r3) + hmul(w[8], s3));
    o[3] = sra1(hmul(-w[8], r3) + hmul(w[9], s3));
    o[4] = sra1(hmul(w[11], r2) + hmul(w[10], s2));
    o[5] = sra1(hmul(-w[10], r2) + hmul(w[11], s2));
    o[6] = sra1(hmul(w[13], r1) + hmul(w[12], s1));
    o[7] = sra1(hmul(-w[12], r1) + hmul(w[13], s1));
  endfunction

  task automatic run_fft(int n, int guard);
    int passes, total, issued, done, bad;
    int idx [4], cur_idx [4];
    logic [31:0] w [14], cur_w [14], o [8];
    longint t_first, t_last;
    real maxerr, rms;

    passes = 0;
    for (int m = n; m > 1; m /= 4) passes++;
    total = (n / 4) * passes;
    for (int i = 0; i < n; i++) begin
      h0re[i] = 32'($signed($urandom) >>> guard);
      h0im[i] = 32'($signed($urandom) >>> guard);
      dre[i] = h0re[i]; dim[i] = h0im[i];
    end

    begin
      int len, base, j;
      len = n; base = 0; j = 0;
      issued = 0; done = 0; bad = 0; t_first = -1; t_last = -1;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (done < total) begin
        @(negedge clk);
        if (exec_valid && exec_addr == 0) begin
          if (t_first < 0) t_first = cyc;
          if (issued > 0) begin
            // collect the previous butterfly
            logic [31:0] got [8];
            got = '{bus[1], bus[5], bus[9], bus[10], bus[12], bus[13], bus[14], bus[15]};
            bfly_ref(cur_w, o);
            for (int k = 0; k < 8; k++) begin
              checks++;
              if (got[k] !== o[k]) begin
                failures++; bad++;
                if (bad < 10) $display("FAIL N=%0d butterfly %0d output %0d got %h exp %h", n, done, k, got[k], o[k]);
              end
            end
            for (int k = 0; k < 4; k++) begin
              dre[cur_idx[k]] = got[2*k];
              dim[cur_idx[k]] = got[2*k+1];
            end
            done++;
            t_last = cyc;
          end
          if (issued < total) begin
            int q;
            q = len / 4;
            for (int k = 0; k < 4; k++) idx[k] = base + j + k * q;
            w[0] = dre[idx[0]]; w[1] = dim[idx[0]];
            w[2] = dre[idx[2]]; w[3] = dim[idx[2]];
            w[4] = dre[idx[1]]; w[5] = dim[idx[1]];
            w[6] = dre[idx[3]]; w[7] = dim[idx[3]];
            for (int k = 1; k < 4; k++) begin
              real ang;
              ang = 2.0 * PI * real'(j * k) / real'(len);
              w[6 + 2*k] = q31($sin(ang));
              w[7 + 2*k] = q31($cos(ang));
            end
            cur_w = w; cur_idx = idx;
            issued++;
            // next butterfly in pass order
            j++;
            if (j == q) begin
              j = 0; base += len;
              if (base == n) begin base = 0; len /= 4; end
            end
          end else begin
            for (int k = 0; k < 14; k++) cur_w[k] = '0;
          end
        end
        data_in = (exec_valid && exec_addr < 14) ? cur_w[exec_addr] : 32'h0;
      end
      stop = 1; @(negedge clk); stop = 0;
      @(negedge clk);
    end

    // processing time: 16 clocks per butterfly
    checks++;
    if (t_last - t_first != longint'(PLEN) * total) begin
      failures++;
      $display("FAIL N=%0d took %0d clocks for %0d butterflies", n, t_last - t_first, total);
    end

    // floating-point DFT of up to 64 bins
    maxerr = 0.0; rms = 0.0;
    for (int b = 0; b < 64 && b < n; b++) begin
      int m, pos, t;
      real sr, si, hr, hi, er, ei, scale;
      m = (n <= 64) ? b : int'($urandom_range(n - 1));
      // position of X(m): base-4 digits of m reversed
      pos = 0; t = m;
      for (int d = 0; d < passes; d++) begin pos = pos * 4 + (t % 4); t /= 4; end
      sr = 0.0; si = 0.0;
      for (int i = 0; i < n; i++) begin
        real a, xr, xi;
        a = 2.0 * PI * real'((longint'(i) * m) % n) / real'(n);
        xr = real'($signed(h0re[i])) / 2147483648.0;
        xi = real'($signed(h0im[i])) / 2147483648.0;
        sr += xr * $cos(a) + xi * $sin(a);
        si += xi * $cos(a) - xr * $sin(a);
      end
      scale = real'(n);
      hr = real'($signed(dre[pos])) / 2147483648.0;
      hi = real'($signed(dim[pos])) / 2147483648.0;
      er = hr - sr / scale; if (er < 0) er = -er;
      ei = hi - si / scale; if (ei < 0) ei = -ei;
      rms += (sr * sr + si * si) / (scale * scale);
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
      checks++;
      if (er > 1.0 / 16384.0 || ei > 1.0 / 16384.0) begin
        failures++;
        $display("FAIL N=%0d X(%0d) = (%f, %f), DFT/%0d = (%f, %f)", n, m, hr, hi, n, sr / scale, si / scale);
      end
    end
    $display("N=%0d: %0d passes, %0d butterflies, %0d clocks, largest error against the DFT %e (rms of the bins %e)",
             n, passes, total, t_last - t_first, maxerr, $sqrt(rms / real'(n < 64 ? n : 64)));
  endtask

  initial begin
    for (int a = 0; a < PLEN; a++) for (int e = 0; e < N_E; e++) prog[a][e] = '0;
    for (int a = 0; a < 14; a++) prog[a][0] = op(X, X, 0, X, 0);           // IN
    prog[1][1]  = op(X, X, 0, X, 0);   prog[1][2]  = op(X, X, 0, X, 0);      // x0
    prog[2][5]  = op(X, X, 0, X, 0);   prog[2][6]  = op(X, X, 0, X, 0);      // y0
    prog[3][1]  = op(X, X, 1, 0, 0);   prog[3][2]  = op(X, X, 2, 0, 1);      // x2
    prog[4][5]  = op(X, X, 5, 0, 0);   prog[4][6]  = op(X, X, 6, 0, 1);      // y2
    prog[5][3]  = op(X, X, 1, 0, 1);   prog[5][1]  = op(X, X, 1, 0, 0);      // x1
    prog[5][8]  = op(X, X, 6, 0, 1);   prog[5][6]  = op(X, X, 6, 0, 0);
    prog[6][5]  = op(X, X, 5, 0, 0);   prog[6][7]  = op(X, X, 5, 0, 1);      // y1
    prog[6][4]  = op(X, X, 2, 0, 0);   prog[6][2]  = op(X, X, 2, 0, 1);
    prog[7][1]  = op(X, X, 1, 0, 0, SH_RIGHT);                              // x3: X0/2
    prog[7][3]  = op(X, X, 3, 0, 1);
    prog[7][8]  = op(X, X, 8, 0, 0);   prog[7][6]  = op(X, X, 6, 0, 1);
    prog[8][5]  = op(X, X, 5, 0, 0, SH_RIGHT);                              // y3: Y0/2
    prog[8][2]  = op(X, X, 2, 0, 0);
    prog[8][4]  = op(X, X, 4, 0, 1);   prog[8][7]  = op(X, X, 7, 0, 1);
    prog[9][9]  = op(0, 8, X, X, 0);   prog[9][11] = op(X, X, X, 0, 1);      // sin a
    prog[9][1]  = op(X, X, 1, X, 0, SH_RIGHT);                              // X0/4
    prog[10][5] = op(X, X, 5, X, 0, SH_RIGHT);                              // Y0/4
    prog[10][9] = op(0, 4, 9, X, 0, SH_RIGHT);   prog[10][10] = op(0, 8, X, X, 0);     // cos a
    prog[11][10] = op(11, 4, 10, X, 0, SH_RIGHT);                                     // sin b
    prog[11][11] = op(X, X, X, 0, 1);  prog[11][12] = op(0, 7, X, X, 0);
    prog[12][12] = op(0, 3, 12, X, 0, SH_RIGHT); prog[12][13] = op(0, 7, X, X, 0);    // cos b
    prog[13][13] = op(11, 3, 13, X, 0, SH_RIGHT);                                     // sin c
    prog[13][11] = op(X, X, X, 0, 1);  prog[13][14] = op(0, 6, X, X, 0);
    prog[14][14] = op(0, 2, 14, X, 0, SH_RIGHT); prog[14][15] = op(0, 6, X, X, 0);    // cos c
    prog[15][15] = op(11, 2, 15, X, 0, SH_RIGHT);

    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int a = 0; a < PLEN; a++)
      for (int e = 0; e < N_E; e++) begin
        prog_we = 1; prog_addr = 6'(a); prog_dpe = 4'(e); prog_data = prog[a][e];
        @(negedge clk);
      end
    prog_we = 0;

    // guard bits: sums of four stay below 1.0 in every pass
    run_fft(16, 3);
    run_fft(256, 4);
    run_fft(1024, 5);
    run_fft(4096, 5);
    run_fft(65536, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
