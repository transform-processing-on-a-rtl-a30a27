// tb_rdpp_top: end-to-end test of the processor at its default size
// (16 elements, 32-bit words, 64-word control store).
//
// It loads an 8-instruction program, one element field per clock, that
// computes a radix-2 FFT butterfly  H0 = (h0 + h1) / 2,  H1 = W (h0 - h1)
// with W = cos - j sin, and loops it so that one butterfly is processed per
// 8 clocks. Input words enter through element 0 in the order
// x0, y0, x1, y1, cos, sin (h = x + j y), one per clock.
//
//   addr  E0   E1            E2      E3            E4      E5              E6              E7
//   0     IN
//   1     IN   R1=P0         P0
//   2     IN                         P0            R1=P0
//   3     IN   (R1+P0)>1     P2-P0                         .               .               P0-P2
//   4     IN                         (P3+P0)>1     R1-P0
//   5     IN                                               P0*P2           R2=P0
//   6                                                      (P0*P4+P5)<1    P0*P7
//   7                                                                      (R2*P4+P6)<1
//
// Results are read from the bus when address 0 executes again:
// Re H0 = E1, Im H0 = E3, Re H1 = E5, Im H1 = E6. Each is compared with a
// bit-exact fixed-point reference (upper-half 16 x 16 products) and with a
// real-valued butterfly computed in floating point. The test also checks the
// load time (8 x 16 clocks), the rate (8 clocks per butterfly), stop/restart,
// and counts every mechanism the program uses; a mechanism never seen is a
// failure.
module tb_rdpp_top;
  import rdpp_pkg::*;
  import rdpp_asm_pkg::*;

  localparam int NB    = 40;   // butterflies
  localparam int PLEN  = 8;
  localparam int N     = 16;

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
  logic [31:0] smp [NB + 1][6];
  int iter = 0;
  int load_cycles = 0;
  longint cyc = 0, last_result_cyc = -1;
  int results = 0;

  // mechanism counters
  int n_input = 0, n_dreg1_ld = 0, n_dreg2_ld = 0, n_dreg1_add = 0, n_dreg2_mul = 0,
      n_sub = 0, n_shl = 0, n_shr = 0, n_self = 0, n_hold = 0, n_wrap = 0, n_mul = 0,
      n_restart = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input stream, lock-stepped to the executing instruction
  always_comb data_in = (exec_valid && exec_addr < 6) ? smp[iter][exec_addr] : 32'h0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (prog_we) load_cycles <= load_cycles + 1;
    if (loop_wrap) n_wrap <= n_wrap + 1;
    if (exec_valid) begin
      for (int i = 0; i < N; i++) begin
        dpe_ctrl_t f;
        f = prog[exec_addr[2:0]][i];   // the instruction executing now
        if (i == 0 && f.out_mode != OUT_HOLD && f.sel2 == SEL_MUX && f.mux_c == 0) n_input++;
        if (f.dreg1_ld) n_dreg1_ld++;
        if (f.dreg2_ld) n_dreg2_ld++;
        if (f.out_mode == OUT_HOLD) n_hold++;
        else begin
          if (f.sel2 == SEL_DREG1) n_dreg1_add++;
          if (f.sel1 == SEL_DREG2 && f.logic1_fn != LG_ZERO) n_dreg2_mul++;
          if (f.sel1 != SEL_ZERO && f.logic1_fn != LG_ZERO) n_mul++;
          if (f.cin && f.logic2_fn == LG_NOT_B) n_sub++;
          if (f.out_mode == OUT_SHL) n_shl++;
          if (f.out_mode == OUT_SHR) n_shr++;
          if (i != 0 && f.sel2 == SEL_MUX && f.mux_c == 4'(i)) n_self++;
        end
      end
      if (exec_addr == 6'(PLEN - 1)) iter <= iter + 1;
    end
  end

  function automatic logic [31:0] hmul(logic [31:0] x, logic [31:0] y);
    longint p;
    p = longint'($signed(x[31:16])) * longint'($signed(y[31:16]));
    return p[31:0];
  endfunction

  function automatic real fx(logic [31:0] v);
    return real'($signed(v)) / 2147483648.0;
  endfunction

  function automatic logic [31:0] q31(real r);
    return 32'($rtoi(r * 2147483648.0));
  endfunction

  task automatic chk(logic [31:0] got, logic [31:0] exp, real approx, string what, int b);
    real err;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL butterfly %0d %s got %h exp %h", b, what, got, exp);
    end
    err = fx(got) - approx;
    if (err < 0) err = -err;
    checks++;
    if (err > 1.0 / 4096.0) begin
      failures++;
      $display("FAIL butterfly %0d %s = %f, real-valued %f", b, what, fx(got), approx);
    end
  endtask

  // compare the bus with butterfly b when address 0 executes again
  task automatic check_results(int b);
    logic [31:0] x0, y0, x1, y1, c, s, dr, di, ndr;
    logic [31:0] e_h0r, e_h0i, e_h1r, e_h1i;
    real rx0, ry0, rx1, ry1, rc, rs;
    x0 = smp[b][0]; y0 = smp[b][1]; x1 = smp[b][2]; y1 = smp[b][3]; c = smp[b][4]; s = smp[b][5];
    dr = x0 - x1; di = y0 - y1; ndr = x1 - x0;
    e_h0r = 32'($signed(x0 + x1) >>> 1);
    e_h0i = 32'($signed(y0 + y1) >>> 1);
    e_h1r = (hmul(c, dr) + hmul(s, di)) << 1;
    e_h1i = (hmul(s, ndr) + hmul(c, di)) << 1;
    rx0 = fx(x0); ry0 = fx(y0); rx1 = fx(x1); ry1 = fx(y1); rc = fx(c); rs = fx(s);
    chk(bus[1], e_h0r, (rx0 + rx1) / 2.0, "Re H0", b);
    chk(bus[3], e_h0i, (ry0 + ry1) / 2.0, "Im H0", b);
    chk(bus[5], e_h1r, (rx0 - rx1) * rc + (ry0 - ry1) * rs, "Re H1", b);
    chk(bus[6], e_h1i, (ry0 - ry1) * rc - (rx0 - rx1) * rs, "Im H1", b);
  endtask

  task automatic put(int a, int e, dpe_ctrl_t f);
    prog[a][e] = f;
  endtask

  initial begin
    bit ok;
    for (int a = 0; a < PLEN; a++) for (int e = 0; e < N; e++) prog[a][e] = '0;
    // E0 copies the input word onto its bus slot at addresses 0..5
    for (int a = 0; a < 6; a++)
      put(a, 0, asm_dpe(1, OP_NONE, OP_NONE, 0, OP_NONE, 0, SH_NONE, OP_NONE, OP_NONE, ok));
    put(1, 1, asm_dpe(0, OP_NONE, OP_NONE, OP_NONE, OP_NONE, 0, SH_NONE, 0, OP_NONE, ok));
    put(1, 2, asm_dpe(1, OP_NONE, OP_NONE, 0, OP_NONE, 0, SH_NONE, OP_NONE, OP_NONE, ok));
    put(2, 3, asm_dpe(1, OP_NONE, OP_NONE, 0, OP_NONE, 0, SH_NONE, OP_NONE, OP_NONE, ok));
    put(2, 4, asm_dpe(0, OP_NONE, OP_NONE, OP_NONE, OP_NONE, 0, SH_NONE, 0, OP_NONE, ok));
    put(3, 1, asm_dpe(1, OP_NONE, OP_NONE, OP_R1, 0, 0, SH_RIGHT, OP_NONE, OP_NONE, ok));
    put(3, 2, asm_dpe(1, OP_NONE, OP_NONE, 2, 0, 1, SH_NONE, OP_NONE, OP_NONE, ok));
    put(3, 7, asm_dpe(1, OP_NONE, OP_NONE, 0, 2, 1, SH_NONE, OP_NONE, OP_NONE, ok));
    put(4, 3, asm_dpe(1, OP_NONE, OP_NONE, 3, 0, 0, SH_RIGHT, OP_NONE, OP_NONE, ok));
    put(4, 4, asm_dpe(1, OP_NONE, OP_NONE, OP_R1, 0, 1, SH_NONE, OP_NONE, OP_NONE, ok));
    put(5, 5, asm_dpe(1, 0, 2, OP_NONE, OP_NONE, 0, SH_NONE, OP_NONE, OP_NONE, ok));
    put(5, 6, asm_dpe(0, OP_NONE, OP_NONE, OP_NONE, OP_NONE, 0, SH_NONE, OP_NONE, 0, ok));
    put(6, 5, asm_dpe(1, 0, 4, 5, OP_NONE, 0, SH_LEFT, OP_NONE, OP_NONE, ok));
    put(6, 6, asm_dpe(1, 0, 7, OP_NONE, OP_NONE, 0, SH_NONE, OP_NONE, OP_NONE, ok));
    put(7, 6, asm_dpe(1, OP_R2, 4, 6, OP_NONE, 0, SH_LEFT, OP_NONE, OP_NONE, ok));

    // samples: |x|, |y| < 0.5, twiddle factors cos/sin of k * 2pi / 16
    for (int b = 0; b <= NB; b++) begin
      real ang;
      for (int k = 0; k < 4; k++) smp[b][k] = 32'($signed($urandom) >>> 2);
      ang = 2.0 * 3.14159265358979 * real'(b % 16) / 16.0;
      smp[b][4] = q31($cos(ang) * 0.99996);
      smp[b][5] = q31($sin(ang) * 0.99996);
    end

    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;

    // program load: every field of every word, one per clock
    for (int a = 0; a < PLEN; a++)
      for (int e = 0; e < N; e++) begin
        prog_we = 1; prog_addr = 6'(a); prog_dpe = 4'(e); prog_data = prog[a][e];
        @(negedge clk);
      end
    prog_we = 0;
    checks++;
    if (load_cycles != PLEN * N) begin failures++; $display("FAIL load took %0d clocks", load_cycles); end

    // nothing runs before start: the bus holds its reset value
    repeat (3) @(negedge clk);
    checks++;
    if (bus !== '0) begin failures++; $display("FAIL bus changed before start"); end

    start = 1; @(negedge clk); start = 0;
    while (results < NB / 2) begin
      @(negedge clk);
      if (exec_valid && exec_addr == 0 && iter > 0) begin
        check_results(iter - 1);
        if (last_result_cyc >= 0) begin
          checks++;
          if (cyc - last_result_cyc != PLEN) begin
            failures++; $display("FAIL rate: %0d clocks per butterfly", cyc - last_result_cyc);
          end
        end
        last_result_cyc = cyc;
        results++;
      end
    end

    // stop, check the bus holds, then restart from address 0
    stop = 1; @(negedge clk); stop = 0;
    begin
      logic [N-1:0][31:0] held;
      @(negedge clk); held = bus;
      repeat (5) @(negedge clk);
      checks++;
      if (bus !== held || exec_valid) begin failures++; $display("FAIL bus changed while stopped"); end
    end
    iter = NB / 2; last_result_cyc = -1;
    start = 1; @(negedge clk); start = 0;
    n_restart++;
    while (results < NB) begin
      @(negedge clk);
      if (exec_valid && exec_addr == 0 && iter > NB / 2) begin
        check_results(iter - 1);
        if (last_result_cyc >= 0) begin
          checks++;
          if (cyc - last_result_cyc != PLEN) begin failures++; $display("FAIL rate after restart"); end
        end
        last_result_cyc = cyc;
        results++;
      end
    end

    $display("mechanisms: input=%0d dreg1_load=%0d dreg2_load=%0d dreg1_addend=%0d dreg2_mult=%0d mult=%0d sub=%0d shl=%0d shr=%0d self=%0d hold=%0d loop_wrap=%0d restart=%0d",
             n_input, n_dreg1_ld, n_dreg2_ld, n_dreg1_add, n_dreg2_mul, n_mul, n_sub, n_shl, n_shr,
             n_self, n_hold, n_wrap, n_restart);
    begin
      int m [13];
      m = '{n_input, n_dreg1_ld, n_dreg2_ld, n_dreg1_add, n_dreg2_mul, n_mul, n_sub, n_shl, n_shr,
            n_self, n_hold, n_wrap, n_restart};
      for (int i = 0; i < 13; i++) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
