// tb_rdpp_logic: self-checking test of the LOGIC block. Checks the named
// functions used by programs (zero, pass A/B, complement, and, or, xor)
// against SystemVerilog operators, and random truth tables bit by bit.
module tb_rdpp_logic;
  import rdpp_pkg::*;
  localparam int unsigned W = 32;
  logic clk = 0;
  logic [3:0] fn;
  logic [W-1:0] a, b, y, e;
  int checks = 0, failures = 0;

  rdpp_logic #(.W(W)) dut (.fn, .a, .b, .y);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] f, input logic [W-1:0] exp);
    fn = f;
    @(posedge clk);
    checks++;
    if (y !== exp) begin failures++; $display("FAIL fn=%b a=%h b=%h y=%h exp=%h", f, a, b, y, exp); end
  endtask

  initial begin
    for (int t = 0; t < 50; t++) begin
      a = $urandom; b = $urandom;
      check(LG_ZERO, '0);
      check(LG_ONES, '1);
      check(LG_A, a);
      check(LG_B, b);
      check(LG_NOT_A, ~a);
      check(LG_NOT_B, ~b);
      check(LG_AND, a & b);
      check(LG_OR, a | b);
      check(LG_XOR, a ^ b);
      // random truth table: f = f3 a b | f2 a ~b | f1 ~a b | f0 ~a ~b
      begin
        logic [3:0] f;
        f = 4'($urandom);
        e = ({W{f[3]}} & a & b) | ({W{f[2]}} & a & ~b) | ({W{f[1]}} & ~a & b) | ({W{f[0]}} & ~a & ~b);
        check(f, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
