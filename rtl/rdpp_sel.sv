// rdpp_sel: data selector (SEL) in front of the MAC of the modified data
// path element.
//
// In the modified element both data registers reach both selectors, so each
// SEL picks one of: its own multiplexer (MUXA for SEL1, MUXC for SEL2),
// DREG1 or DREG2. The fourth code, a constant zero, is this design's choice;
// it lets an instruction omit the C addend. Combinational.
module rdpp_sel
  import rdpp_pkg::*;
#(
  parameter int unsigned W = rdpp_pkg::RDPP_W
) (
  input  sel_t         sel,
  input  logic [W-1:0] mux_i,
  input  logic [W-1:0] dreg1_i,
  input  logic [W-1:0] dreg2_i,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (sel)
      SEL_MUX:   y = mux_i;
      SEL_DREG1: y = dreg1_i;
      SEL_DREG2: y = dreg2_i;
      default:   y = '0;
    endcase
  end
endmodule
