// rdpp_asm_pkg: testbench helper that encodes one DPE instruction of the
// form  A * B + C +/- D [shift]  R1 = x  R2 = y  into a DPE control field,
// following the operand routing of the modified data path element:
//   A multiplicand   -> SEL1 (MUXA, DREG1 or DREG2)
//   B multiplicand   -> LOGIC1 (MUXB passed through)
//   C addend         -> SEL2 (MUXC, DREG1 or DREG2)
//   D final addend   -> LOGIC2 (MUXD passed, or complemented with carry 1)
//   R1 load          -> from MUXA,  R2 load -> from MUXC
// Operands: 0..15 name a DPE output (P0..PF), OP_R1/OP_R2 a data register,
// OP_NONE an omitted operand (constant zero). If both multiplicands are bus
// words and R1 is loaded, the multiplicand equal to the R1 source is routed
// through MUXA. Conflicts are reported through `ok`.
package rdpp_asm_pkg;
  import rdpp_pkg::*;

  localparam int OP_NONE = -1;
  localparam int OP_R1   = 16;
  localparam int OP_R2   = 17;

  localparam int SH_NONE  = 0;
  localparam int SH_LEFT  = 1;   // "<1"
  localparam int SH_RIGHT = 2;   // ">1"

  function automatic sel_t reg_sel(int op);
    return (op == OP_R1) ? SEL_DREG1 : SEL_DREG2;
  endfunction

  function automatic bit is_reg(int op);
    return op == OP_R1 || op == OP_R2;
  endfunction

  // alu = 0 leaves the output register unchanged (only register loads).
  function automatic dpe_ctrl_t asm_dpe(bit alu, int a, int b, int c, int d, bit sub,
                                        int shift, int r1, int r2, output bit ok);
    dpe_ctrl_t f;
    int ma, mb;
    f  = '0;
    ok = 1;
    ma = r1;                // MUXA source, OP_NONE when free
    if (alu) begin
      // multiplier
      if (a != OP_NONE && b != OP_NONE) begin
        if (is_reg(b)) begin int t; t = a; a = b; b = t; end
        if (is_reg(b)) ok = 0;                 // two register multiplicands
        if (is_reg(a)) begin
          f.sel1 = reg_sel(a);
          mb = b;
        end else begin
          // one multiplicand must pass MUXA
          if (ma != OP_NONE && ma != a) begin
            if (ma == b) begin int t; t = a; a = b; b = t; end
            else ok = 0;
          end
          ma     = a;
          f.sel1 = SEL_MUX;
          mb     = b;
        end
        f.mux_b     = SEL_W'(mb);
        f.logic1_fn = LG_B;
      end else begin
        f.sel1      = SEL_ZERO;
        f.logic1_fn = LG_ZERO;
      end
      // addend C
      if (c == OP_NONE) f.sel2 = SEL_ZERO;
      else if (is_reg(c)) f.sel2 = reg_sel(c);
      else begin
        if (r2 != OP_NONE && r2 != c) ok = 0;
        f.mux_c = SEL_W'(c);
        f.sel2  = SEL_MUX;
      end
      // addend D
      if (d == OP_NONE) f.logic2_fn = LG_ZERO;
      else if (is_reg(d)) ok = 0;
      else begin
        f.mux_d     = SEL_W'(d);
        f.logic2_fn = sub ? LG_NOT_B : LG_B;
        f.cin       = sub;
      end
      f.out_mode = (shift == SH_LEFT) ? OUT_SHL : (shift == SH_RIGHT) ? OUT_SHR : OUT_LOAD;
    end
    if (ma != OP_NONE) f.mux_a = SEL_W'(ma);
    if (r1 != OP_NONE) f.dreg1_ld = 1'b1;
    if (r2 != OP_NONE) begin f.dreg2_ld = 1'b1; f.mux_c = SEL_W'(r2); end
    return f;
  endfunction
endpackage
