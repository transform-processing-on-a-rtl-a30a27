// rdpp_logic: LOGIC block of a data path element.
//
// Performs a simple Boolean operation, bit by bit, on two multiplexer
// outputs (MUXA/MUXB for LOGIC1, MUXC/MUXD for LOGIC2). The operation is a
// 4-bit truth table, result bit = fn[{a_bit, b_bit}], so all sixteen
// two-input functions are available: pass A or B, the one's complement used
// for subtraction, and constant zero used when an operand is omitted. The
// truth-table encoding is this design's choice. Combinational.
module rdpp_logic #(
  parameter int unsigned W = rdpp_pkg::RDPP_W
) (
  input  logic [3:0]   fn,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb begin
    for (int i = 0; i < W; i++) y[i] = fn[{a[i], b[i]}];
  end
endmodule
