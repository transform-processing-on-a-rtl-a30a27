// rdpp_pkg: shared sizes, control-word layout and operation codes of the
// reconfigurable data path processor (RDPP).
//
// The processor is N_DPE identical data path elements (DPEs) joined by a
// global bus that carries every DPE's W-bit output register. Each clock one
// instruction from a wide control store drives every DPE; the instruction is
// N_DPE fields of CTRL_W bits, one per DPE.
//
// Sixteen DPEs, 32-bit words and a 528-bit instruction follow the design
// description. How the 33 bits of one DPE's field are split is this design's
// own choice; it happens to need exactly 33 bits:
//   4 x 4 bits  global-bus select of MUXA, MUXB, MUXC, MUXD
//   2 x 2 bits  SEL1 / SEL2 operand source (zero, MUX, DREG1, DREG2)
//   2 x 4 bits  LOGIC1 / LOGIC2 truth tables
//   2 x 1 bit   load DREG1 (from MUXA) / load DREG2 (from MUXC)
//   1 bit       carry into the MAC adder
//   2 bits      output register mode (hold, load, load<<1, load>>>1)
// The all-zero field is the default instruction (NOP / HOLD): the output
// register and both data registers keep their values.
package rdpp_pkg;

  localparam int unsigned RDPP_N_DPE  = 16;            // data path elements
  localparam int unsigned RDPP_W      = 32;            // bus / register width
  localparam int unsigned SEL_W  = $clog2(RDPP_N_DPE); // global-bus select width
  localparam int unsigned RDPP_DEPTH  = 64;            // control store words
  localparam int unsigned RDPP_ADDR_W = $clog2(RDPP_DEPTH);

  // Operand source of a SEL data selector.
  typedef enum logic [1:0] {
    SEL_ZERO  = 2'd0,
    SEL_MUX   = 2'd1,   // SEL1: MUXA, SEL2: MUXC
    SEL_DREG1 = 2'd2,
    SEL_DREG2 = 2'd3
  } sel_t;

  // Output register update.
  typedef enum logic [1:0] {
    OUT_HOLD = 2'd0,
    OUT_LOAD = 2'd1,
    OUT_SHL  = 2'd2,    // MAC result shifted one bit left
    OUT_SHR  = 2'd3     // MAC result shifted one bit right, arithmetic
  } out_mode_t;

  // LOGIC truth tables: result bit = fn[{a_bit, b_bit}].
  localparam logic [3:0] LG_ZERO  = 4'b0000;
  localparam logic [3:0] LG_ONES  = 4'b1111;
  localparam logic [3:0] LG_A     = 4'b1100;
  localparam logic [3:0] LG_B     = 4'b1010;
  localparam logic [3:0] LG_NOT_A = 4'b0011;
  localparam logic [3:0] LG_NOT_B = 4'b0101;
  localparam logic [3:0] LG_AND   = 4'b1000;
  localparam logic [3:0] LG_OR    = 4'b1110;
  localparam logic [3:0] LG_XOR   = 4'b0110;

  // One DPE's field of the instruction word.
  typedef struct packed {
    logic [SEL_W-1:0] mux_a;
    logic [SEL_W-1:0] mux_b;
    logic [SEL_W-1:0] mux_c;
    logic [SEL_W-1:0] mux_d;
    sel_t             sel1;
    sel_t             sel2;
    logic [3:0]       logic1_fn;
    logic [3:0]       logic2_fn;
    logic             dreg1_ld;
    logic             dreg2_ld;
    logic             cin;
    out_mode_t        out_mode;
  } dpe_ctrl_t;

  localparam int unsigned CTRL_W  = $bits(dpe_ctrl_t);  // 33
  localparam int unsigned INSTR_W = RDPP_N_DPE * CTRL_W;     // 528

endpackage
