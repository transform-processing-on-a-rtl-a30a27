// tb_rdpp_out_reg: self-checking test of the DPE output register: reset,
// hold, load, left shift and arithmetic right shift with random data,
// against a reference computed with SystemVerilog shift operators.
module tb_rdpp_out_reg;
  import rdpp_pkg::*;
  localparam int unsigned W = 32;
  logic clk = 0, rst_n = 0;
  out_mode_t mode = OUT_LOAD;
  logic [W-1:0] d = 32'h1234_5678, q, e;
  int checks = 0, failures = 0;

  rdpp_out_reg #(.W(W)) dut (.clk, .rst_n, .mode, .d, .q);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++; if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1; e = '0;
    for (int t = 0; t < 800; t++) begin
      mode = out_mode_t'(t % 4);
      d = $urandom;
      @(posedge clk);
      case (mode)
        OUT_LOAD: e = d;
        OUT_SHL:  e = d << 1;
        OUT_SHR:  e = W'($signed(d) >>> 1);
        default:  e = e;
      endcase
      #1;
      checks++;
      if (q !== e) begin failures++; $display("FAIL mode=%0d d=%h q=%h exp=%h", mode, d, q, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
