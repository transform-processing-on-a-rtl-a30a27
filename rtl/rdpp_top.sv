// rdpp_top: reconfigurable data path processor.
//
// N_DPE data path elements (rdpp_dpe) share a global bus made of all their
// output registers (N_DPE x W = 512 bits), so every element can read the
// output of every other element, itself included, each clock. A control
// store (rdpp_ctrl_store) holds the program; a sequencer (rdpp_sequencer)
// issues one instruction per clock and repeats a loop of instructions
// without end. While no instruction is executing, every element receives
// the all-zero default instruction and holds its state.
//
// Data input: samples enter through a single element, INPUT_DPE. In that
// element's view of the global bus its own slot is replaced by `data_in`,
// so an instruction of that element that selects source INPUT_DPE reads the
// input word (e.g. "load output = MUXC" copies it onto the bus). The choice
// of element and of this substitution is this design's own; the input is
// sampled in the cycle whose instruction reads it, with no handshake, in the
// data-flow style the processor is meant to run in.
//
// Interface: program loading (prog_*), start/stop and loop bounds, the
// input word, and the whole global bus as output. exec_valid/exec_addr tell
// which instruction the data path executes in the current cycle.
module rdpp_top
  import rdpp_pkg::*;
#(
  parameter int unsigned N_DPE     = rdpp_pkg::RDPP_N_DPE,
  parameter int unsigned W         = rdpp_pkg::RDPP_W,
  parameter int unsigned DEPTH     = rdpp_pkg::RDPP_DEPTH,
  parameter int unsigned INPUT_DPE = 0
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // program loading, one element field per clock
  input  logic                           prog_we,
  input  logic [$clog2(DEPTH)-1:0]       prog_addr,
  input  logic [$clog2(N_DPE)-1:0]       prog_dpe,
  input  dpe_ctrl_t                      prog_data,
  // execution control
  input  logic                           start,
  input  logic                           stop,
  input  logic [$clog2(DEPTH)-1:0]       loop_start,
  input  logic [$clog2(DEPTH)-1:0]       loop_end,
  output logic                           exec_valid,
  output logic [$clog2(DEPTH)-1:0]       exec_addr,
  output logic                           loop_wrap,
  // data
  input  logic [W-1:0]                   data_in,
  output logic [N_DPE-1:0][W-1:0]        bus_o
);
  logic                     rd_en;
  logic [$clog2(DEPTH)-1:0] rd_addr;
  dpe_ctrl_t [N_DPE-1:0]    store_q;
  dpe_ctrl_t [N_DPE-1:0]    instr;
  logic [N_DPE-1:0][W-1:0]  bus;

  rdpp_sequencer #(.DEPTH(DEPTH)) u_seq (
    .clk, .rst_n, .start, .stop, .loop_start, .loop_end,
    .rd_en, .rd_addr, .exec_valid, .exec_addr, .loop_wrap
  );

  rdpp_ctrl_store #(.N_DPE(N_DPE), .DEPTH(DEPTH)) u_store (
    .clk, .wr_en(prog_we), .wr_addr(prog_addr), .wr_dpe(prog_dpe), .wr_data(prog_data),
    .rd_en, .rd_addr, .rd_data(store_q)
  );

  always_comb instr = exec_valid ? store_q : '0;

  for (genvar i = 0; i < N_DPE; i++) begin : g_dpe
    logic [N_DPE-1:0][W-1:0] view;
    always_comb begin
      view = bus;
      if (i == INPUT_DPE) view[i] = data_in;
    end
    rdpp_dpe #(.N_DPE(N_DPE), .W(W)) u_dpe (
      .clk, .rst_n, .bus_i(view), .ctrl(instr[i]), .out_o(bus[i])
    );
  end

  assign bus_o = bus;
endmodule
