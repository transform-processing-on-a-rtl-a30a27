// rdpp_bus_mux: one of the four input multiplexers (MUXA..MUXD) of a data
// path element.
//
// The global bus carries the output registers of all N_DPE elements; the
// multiplexer passes the word of the element named by `sel` to its output.
// Sixteen 32-bit sources follow the design description; the binary select
// code (element index) is this design's choice. Purely combinational.
module rdpp_bus_mux #(
  parameter int unsigned N_DPE = rdpp_pkg::RDPP_N_DPE,
  parameter int unsigned W     = rdpp_pkg::RDPP_W
) (
  input  logic [N_DPE-1:0][W-1:0]      bus_i,  // all DPE outputs
  input  logic [$clog2(N_DPE)-1:0]     sel,    // index of the source DPE
  output logic [W-1:0]                 y
);
  always_comb y = bus_i[sel];
endmodule
