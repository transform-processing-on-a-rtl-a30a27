// tb_rdpp_bus_mux: self-checking test of the global-bus input multiplexer.
// Fills the bus with random words and checks that every select code returns
// the word of that element, for many random buses.
module tb_rdpp_bus_mux;
  localparam int unsigned N = 16, W = 32;
  logic clk = 0;
  logic [N*W-1:0] flat;
  logic [N-1:0][W-1:0] bus;
  logic [3:0] sel;
  logic [W-1:0] y;
  int checks = 0, failures = 0;

  rdpp_bus_mux #(.N_DPE(N), .W(W)) dut (.bus_i(bus), .sel, .y);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int k = 0; k < N; k++) flat[k*W +: W] = $urandom;
      bus = flat;
      for (int s = 0; s < N; s++) begin
        sel = 4'(s);
        @(posedge clk);
        checks++;
        if (y !== flat[s*W +: W]) begin
          failures++;
          $display("FAIL sel=%0d y=%h exp=%h", s, y, flat[s*W +: W]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
