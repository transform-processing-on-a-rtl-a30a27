// rdpp_dreg: data register DREG1 or DREG2 of a data path element.
//
// Holds a word for later use. When `ld` is high at a rising clock edge it
// takes the value of its input multiplexer (MUXA for DREG1, MUXC for DREG2),
// otherwise it keeps its value, as the description requires for an omitted
// "R1=" / "R2=" term. The synchronous active-low reset to zero is this
// design's choice. The new value is visible the cycle after the load.
module rdpp_dreg #(
  parameter int unsigned W = rdpp_pkg::RDPP_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end
endmodule
