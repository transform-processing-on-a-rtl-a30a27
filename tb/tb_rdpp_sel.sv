// tb_rdpp_sel: self-checking test of the SEL data selector: each of the four
// codes (zero, multiplexer, DREG1, DREG2) with random operand words.
module tb_rdpp_sel;
  import rdpp_pkg::*;
  localparam int unsigned W = 32;
  logic clk = 0;
  sel_t sel;
  logic [W-1:0] m, r1, r2, y, e;
  int checks = 0, failures = 0;

  rdpp_sel #(.W(W)) dut (.sel, .mux_i(m), .dreg1_i(r1), .dreg2_i(r2), .y);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      m = $urandom; r1 = $urandom; r2 = $urandom;
      sel = sel_t'(t % 4);
      case (t % 4)
        0: e = '0;
        1: e = m;
        2: e = r1;
        default: e = r2;
      endcase
      @(posedge clk);
      checks++;
      if (y !== e) begin failures++; $display("FAIL sel=%0d y=%h exp=%h", t % 4, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
