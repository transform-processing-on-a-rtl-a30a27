// rdpp_ctrl_store: the wide control store of the processor.
//
// An on-chip RAM of DEPTH instructions, each N_DPE fields of CTRL_W bits
// (16 x 33 = 528 bits), preloaded before processing begins. Loading writes
// one element's field per clock (`wr_en`, `wr_addr`, `wr_dpe`, `wr_data`),
// so a 63-word program takes 63 x 16 = 1008 clocks, in line with the roughly
// 1000 clocks quoted for loading a program. The field-per-clock load port
// and the depth of 64 words are this design's choices.
//
// The read port is synchronous: with `rd_en` high at a rising edge,
// `rd_data` holds word `rd_addr` from the next cycle on; it acts as the
// instruction register. Built as one memory per element field.
module rdpp_ctrl_store
  import rdpp_pkg::*;
#(
  parameter int unsigned N_DPE = rdpp_pkg::RDPP_N_DPE,
  parameter int unsigned DEPTH = rdpp_pkg::RDPP_DEPTH
) (
  input  logic                           clk,
  input  logic                           wr_en,
  input  logic [$clog2(DEPTH)-1:0]       wr_addr,
  input  logic [$clog2(N_DPE)-1:0]       wr_dpe,
  input  dpe_ctrl_t                      wr_data,
  input  logic                           rd_en,
  input  logic [$clog2(DEPTH)-1:0]       rd_addr,
  output dpe_ctrl_t [N_DPE-1:0]          rd_data
);
  for (genvar i = 0; i < N_DPE; i++) begin : g_field
    logic [CTRL_W-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (wr_en && wr_dpe == ($clog2(N_DPE))'(i)) mem[wr_addr] <= wr_data;
    end

    always_ff @(posedge clk) begin
      if (rd_en) rd_data[i] <= mem[rd_addr];
    end
  end
endmodule
