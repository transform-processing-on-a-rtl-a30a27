// rdpp_dpe: modified data path element (DPE) of the reconfigurable data
// path processor.
//
// Structure, as described for the modified element:
//   global bus -> MUXA, MUXB, MUXC, MUXD (each selects one DPE output)
//   MUXA -> DREG1, SEL1, LOGIC1     MUXB -> LOGIC1
//   MUXC -> DREG2, SEL2, LOGIC2     MUXD -> LOGIC2
//   DREG1 and DREG2 -> both SEL1 and SEL2
//   MAC: out = SEL1 * LOGIC1 + SEL2 + LOGIC2 + cin -> output register
// so one instruction performs  A*B + C +/- D [shift]  R1 = A  R2 = C, with
// either data register usable as multiplier or as addend.
//
// Interface: `bus_i` is the whole global bus (element i at index i), `ctrl`
// this element's field of the current instruction, `out_o` the output
// register. Timing: everything is done in one clock; the output register and
// the data registers change at the rising edge that ends the instruction,
// so a result is seen by all elements in the next cycle.
module rdpp_dpe
  import rdpp_pkg::*;
#(
  parameter int unsigned N_DPE = rdpp_pkg::RDPP_N_DPE,
  parameter int unsigned W     = rdpp_pkg::RDPP_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_DPE-1:0][W-1:0] bus_i,
  input  dpe_ctrl_t               ctrl,
  output logic [W-1:0]            out_o
);
  logic [W-1:0] mux_a, mux_b, mux_c, mux_d;
  logic [W-1:0] dreg1, dreg2;
  logic [W-1:0] sel1, sel2, logic1, logic2;
  logic [W-1:0] mac_y;

  rdpp_bus_mux #(.N_DPE(N_DPE), .W(W)) u_muxa (.bus_i, .sel(ctrl.mux_a[$clog2(N_DPE)-1:0]), .y(mux_a));
  rdpp_bus_mux #(.N_DPE(N_DPE), .W(W)) u_muxb (.bus_i, .sel(ctrl.mux_b[$clog2(N_DPE)-1:0]), .y(mux_b));
  rdpp_bus_mux #(.N_DPE(N_DPE), .W(W)) u_muxc (.bus_i, .sel(ctrl.mux_c[$clog2(N_DPE)-1:0]), .y(mux_c));
  rdpp_bus_mux #(.N_DPE(N_DPE), .W(W)) u_muxd (.bus_i, .sel(ctrl.mux_d[$clog2(N_DPE)-1:0]), .y(mux_d));

  rdpp_dreg #(.W(W)) u_dreg1 (.clk, .rst_n, .ld(ctrl.dreg1_ld), .d(mux_a), .q(dreg1));
  rdpp_dreg #(.W(W)) u_dreg2 (.clk, .rst_n, .ld(ctrl.dreg2_ld), .d(mux_c), .q(dreg2));

  rdpp_sel #(.W(W)) u_sel1 (.sel(ctrl.sel1), .mux_i(mux_a), .dreg1_i(dreg1), .dreg2_i(dreg2), .y(sel1));
  rdpp_sel #(.W(W)) u_sel2 (.sel(ctrl.sel2), .mux_i(mux_c), .dreg1_i(dreg1), .dreg2_i(dreg2), .y(sel2));

  rdpp_logic #(.W(W)) u_logic1 (.fn(ctrl.logic1_fn), .a(mux_a), .b(mux_b), .y(logic1));
  rdpp_logic #(.W(W)) u_logic2 (.fn(ctrl.logic2_fn), .a(mux_c), .b(mux_d), .y(logic2));

  rdpp_mac #(.W(W)) u_mac (.a(sel1), .b(logic1), .c(sel2), .d(logic2), .cin(ctrl.cin), .y(mac_y));

  rdpp_out_reg #(.W(W)) u_out (.clk, .rst_n, .mode(ctrl.out_mode), .d(mac_y), .q(out_o));
endmodule
