// tb_rdpp_ctrl_store: self-checking test of the control store. Loads a full
// program of 63 words, one element field per clock, checks that the load
// takes 63 x 16 = 1008 clocks, then reads every word back (one-cycle read
// latency) and compares all 528 bits with a copy kept in the testbench.
// Finally rewrites single fields and checks that neighbours are untouched.
module tb_rdpp_ctrl_store;
  import rdpp_pkg::*;
  localparam int unsigned N = 16, D = 64, WORDS = 63;

  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [5:0] wr_addr = '0, rd_addr = '0;
  logic [3:0] wr_dpe = '0;
  dpe_ctrl_t wr_data = '0;
  dpe_ctrl_t [N-1:0] rd_data;
  logic [CTRL_W-1:0] shadow [D][N];
  int checks = 0, failures = 0;
  int load_cycles = 0;

  rdpp_ctrl_store #(.N_DPE(N), .DEPTH(D)) dut (.clk, .wr_en, .wr_addr, .wr_dpe, .wr_data,
                                               .rd_en, .rd_addr, .rd_data);

  always #5 clk = ~clk;
  always @(posedge clk) if (wr_en) load_cycles++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(int a);
    rd_en = 1; rd_addr = 6'(a);
    @(posedge clk); #1;
    rd_en = 0;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (rd_data[k] !== shadow[a][k]) begin
        failures++;
        $display("FAIL word %0d field %0d got %h exp %h", a, k, rd_data[k], shadow[a][k]);
      end
    end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < WORDS; a++)
      for (int k = 0; k < N; k++) begin
        shadow[a][k] = {$urandom, 1'($urandom)};
        wr_en = 1; wr_addr = 6'(a); wr_dpe = 4'(k); wr_data = dpe_ctrl_t'(shadow[a][k]);
        @(negedge clk);
      end
    wr_en = 0;
    checks++;
    if (load_cycles != WORDS * N) begin failures++; $display("FAIL load took %0d clocks", load_cycles); end
    for (int a = 0; a < WORDS; a++) read_check(a);
    // rewrite single fields
    for (int t = 0; t < 40; t++) begin
      int a, k;
      a = $urandom_range(WORDS - 1); k = $urandom_range(N - 1);
      @(negedge clk);
      shadow[a][k] = {$urandom, 1'($urandom)};
      wr_en = 1; wr_addr = 6'(a); wr_dpe = 4'(k); wr_data = dpe_ctrl_t'(shadow[a][k]);
      @(negedge clk);
      wr_en = 0;
      read_check(a);
    end
    // read port holds its value while rd_en is low
    begin
      dpe_ctrl_t [N-1:0] held;
      held = rd_data;
      rd_addr = 6'd3;
      repeat (3) @(posedge clk);
      #1; checks++;
      if (rd_data !== held) begin failures++; $display("FAIL output changed without rd_en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
