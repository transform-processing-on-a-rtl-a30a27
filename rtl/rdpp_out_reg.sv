// rdpp_out_reg: output register of a data path element.
//
// The register drives this element's slice of the global bus. Each clock it
// loads the MAC result unshifted, shifted one bit left, or shifted one bit
// right arithmetically, or holds its value (the default instruction). The
// four modes follow the description; the synchronous active-low reset to
// zero is this design's choice.
module rdpp_out_reg
  import rdpp_pkg::*;
#(
  parameter int unsigned W = rdpp_pkg::RDPP_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  out_mode_t    mode,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else begin
      unique case (mode)
        OUT_LOAD: q <= d;
        OUT_SHL:  q <= {d[W-2:0], 1'b0};
        OUT_SHR:  q <= {d[W-1], d[W-1:1]};
        default:  q <= q;
      endcase
    end
  end
endmodule
