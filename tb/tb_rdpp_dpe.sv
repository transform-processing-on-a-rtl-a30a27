// tb_rdpp_dpe: self-checking test of the modified data path element.
// The element sits at bus index SELF; its own output is fed back into its
// bus slot, the other fifteen slots are random words. Part 1 runs the
// instruction examples of the programming description (multiply with left
// shift and two register loads, "*=" with subtraction, a data register as
// multiplier, "R2" as the whole ALU field, the default instruction) with
// expected values worked out by hand-written fixed-point arithmetic.
// Part 2 applies random control fields and compares with a reference model
// of the element written from the operand-routing rules.
module tb_rdpp_dpe;
  import rdpp_pkg::*;
  import rdpp_asm_pkg::*;
  localparam int unsigned N = 16, W = 32, SELF = 5;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][W-1:0] bus, other;
  dpe_ctrl_t ctrl;
  logic [W-1:0] out;
  logic [W-1:0] m_out, m_r1, m_r2;
  int checks = 0, failures = 0;
  int n_dreg2_mul = 0;

  rdpp_dpe #(.N_DPE(N), .W(W)) dut (.clk, .rst_n, .bus_i(bus), .ctrl, .out_o(out));

  always_comb begin
    bus = other;
    bus[SELF] = out;
  end

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] hi_mul(logic [W-1:0] x, logic [W-1:0] y);
    longint p;
    p = longint'($signed(x[31:16])) * longint'($signed(y[31:16]));
    return p[W-1:0];
  endfunction

  // reference model of one clock of the element
  task automatic model_step(dpe_ctrl_t f);
    logic [W-1:0] ma, mb, mc, md, s1, s2, l1, l2, sum;
    ma = bus[f.mux_a]; mb = bus[f.mux_b]; mc = bus[f.mux_c]; md = bus[f.mux_d];
    s1 = (f.sel1 == SEL_MUX) ? ma : (f.sel1 == SEL_DREG1) ? m_r1 : (f.sel1 == SEL_DREG2) ? m_r2 : '0;
    s2 = (f.sel2 == SEL_MUX) ? mc : (f.sel2 == SEL_DREG1) ? m_r1 : (f.sel2 == SEL_DREG2) ? m_r2 : '0;
    for (int i = 0; i < W; i++) begin
      l1[i] = f.logic1_fn[{ma[i], mb[i]}];
      l2[i] = f.logic2_fn[{mc[i], md[i]}];
    end
    sum = hi_mul(s1, l1) + s2 + l2 + W'(f.cin);
    case (f.out_mode)
      OUT_LOAD: m_out = sum;
      OUT_SHL:  m_out = sum << 1;
      OUT_SHR:  m_out = W'($signed(sum) >>> 1);
      default:  ;
    endcase
    if (f.dreg1_ld) m_r1 = ma;
    if (f.dreg2_ld) m_r2 = mc;
  endtask

  task automatic run(dpe_ctrl_t f, logic [W-1:0] exp, string what);
    ctrl = f;
    @(posedge clk); #1;
    checks++;
    if (out !== exp) begin failures++; $display("FAIL %s out=%h exp=%h", what, out, exp); end
  endtask

  initial begin
    bit ok;
    dpe_ctrl_t f;
    ctrl = '0;
    for (int k = 0; k < N; k++) other[k] = '0;
    @(posedge clk); #1;
    rst_n = 1;
    checks++; if (out !== '0) begin failures++; $display("FAIL reset"); end

    // P0 = 0.5, P1 = 0.25, P3 = 0.125, P4 = -0.5, P7 = 0x0707_0707
    other[0] = 32'h4000_0000; other[1] = 32'h2000_0000; other[3] = 32'h1000_0000;
    other[4] = 32'hC000_0000; other[7] = 32'h0707_0707;

    // "P0*P1<1 R1=P1 R2=P7": 0.5*0.25 = 0.125 -> 0x1000_0000
    f = asm_dpe(1, 0, 1, OP_NONE, OP_NONE, 0, SH_LEFT, 1, 7, ok);
    checks++; if (!ok) begin failures++; $display("FAIL asm 1"); end
    run(f, 32'h1000_0000, "P0*P1<1");
    // "R2": output = DREG2 = P7
    f = asm_dpe(1, OP_NONE, OP_NONE, OP_R2, OP_NONE, 0, SH_NONE, OP_NONE, OP_NONE, ok);
    run(f, 32'h0707_0707, "R2");
    // "R1": output = DREG1 = P1 (DREG1 as addend)
    f = asm_dpe(1, OP_NONE, OP_NONE, OP_R1, OP_NONE, 0, SH_NONE, OP_NONE, OP_NONE, ok);
    run(f, 32'h2000_0000, "R1");
    // "*P4-P3": out(0.25) * -0.5 = -0.125 as 2/0/30 = 0xF800_0000, minus P3
    f = asm_dpe(1, SELF, 4, OP_NONE, 3, 1, SH_NONE, OP_NONE, OP_NONE, ok);
    run(f, 32'hF800_0000 - 32'h1000_0000, "*P4-P3");
    // "P3*R1-P5" with P5 = own output: 0.125*0.25 = 1/32 (2/0/30: 0x0200_0000)
    begin
      logic [W-1:0] prev;
      prev = out;
      f = asm_dpe(1, 3, OP_R1, OP_NONE, SELF, 1, SH_NONE, OP_NONE, OP_NONE, ok);
      run(f, 32'h0200_0000 - prev, "P3*R1-P5");
    end
    // "P6*P8 R1=P9" is rejected
    f = asm_dpe(1, 6, 8, OP_NONE, OP_NONE, 0, SH_NONE, 9, OP_NONE, ok);
    checks++; if (ok) begin failures++; $display("FAIL conflict not found"); end
    // DREG2 as multiplier (modified data path): R2 = P7 earlier; load R2 = P0
    f = asm_dpe(0, OP_NONE, OP_NONE, OP_NONE, OP_NONE, 0, SH_NONE, OP_NONE, 0, ok);
    begin
      logic [W-1:0] prev;
      prev = out;
      run(f, prev, "R2=P0 keeps output");
    end
    // "R2*P4>1" : 0.5 * -0.5 = -0.25 (2/0/30: 0xF000_0000) >>> 1 = 0xF800_0000
    f = asm_dpe(1, OP_R2, 4, OP_NONE, OP_NONE, 0, SH_RIGHT, OP_NONE, OP_NONE, ok);
    run(f, 32'hF800_0000, "R2*P4>1");
    n_dreg2_mul++;
    // "P1 + R2": DREG2 as addend
    f = asm_dpe(1, OP_NONE, OP_NONE, OP_R2, 1, 0, SH_NONE, OP_NONE, OP_NONE, ok);
    run(f, 32'h6000_0000, "R2+P1");
    // default instruction holds
    run('0, 32'h6000_0000, "NOP");

    // Part 2: random control fields against the model
    m_out = out; m_r1 = 32'h2000_0000; m_r2 = 32'h4000_0000;
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < N; k++) if (k != SELF) other[k] = $urandom;
      f = dpe_ctrl_t'({$urandom, 1'($urandom)});
      #1;
      model_step(f);
      run(f, m_out, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
