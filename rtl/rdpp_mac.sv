// rdpp_mac: multiplier/accumulator of a data path element.
//
// Computes y = A * B + C + D + cin in one clock period (combinational here;
// the result is captured by the output register). A comes from SEL1, B from
// LOGIC1, C from SEL2 and D from LOGIC2; subtraction of D is done outside by
// LOGIC2 forming its one's complement with cin = 1.
//
// As described, the multiplier inputs are half as wide as the data words so
// that the product is as wide as the adder. Which half is used is this
// design's choice: the upper halves, read as signed fractions, so that two
// 1/0/15 operands give a 2/0/30 product (one extra sign bit, removed with a
// left shift in the output register). The sum wraps at W bits; the data
// format is meant to keep it from overflowing.
// The lower halves of A and B are deliberately unused by the multiplier
// (they still reach the adder through C and D when routed there).
module rdpp_mac #(
  parameter int unsigned W = rdpp_pkg::RDPP_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic         cin,
  output logic [W-1:0] y
);
  localparam int unsigned MW = W / 2;

  logic signed [MW-1:0] a_h, b_h;
  logic signed [W-1:0]  prod;

  always_comb begin
    a_h  = a[W-1 -: MW];
    b_h  = b[W-1 -: MW];
    prod = W'(a_h * b_h);
    y    = prod + c + d + W'(cin);
  end
endmodule
