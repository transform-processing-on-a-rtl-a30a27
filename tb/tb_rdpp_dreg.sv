// tb_rdpp_dreg: self-checking test of a DPE data register. Applies random
// load enables and data and compares with a reference register kept in the
// testbench, including reset to zero.
module tb_rdpp_dreg;
  localparam int unsigned W = 32;
  logic clk = 0, rst_n = 0, ld = 0;
  logic [W-1:0] d = '0, q, ref_q;
  int checks = 0, failures = 0;

  rdpp_dreg #(.W(W)) dut (.clk, .rst_n, .ld, .d, .q);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 1; d = 32'hdeadbeef;
    @(posedge clk); #1;
    checks++; if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1; ref_q = '0;
    for (int t = 0; t < 500; t++) begin
      ld = 1'($urandom); d = $urandom;
      @(posedge clk);
      if (ld) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL t=%0d q=%h exp=%h", t, q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
