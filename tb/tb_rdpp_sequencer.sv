// tb_rdpp_sequencer: self-checking test of instruction sequencing. After a
// start pulse the executed addresses must be 0,1,...,loop_end, then
// loop_start..loop_end repeated, one per clock, with the control store
// addressed one cycle ahead; stop must end execution. Covers a loop with a
// preamble, a loop of one instruction and a loop that restarts at 0.
module tb_rdpp_sequencer;
  localparam int unsigned D = 64;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic [5:0] loop_start = '0, loop_end = '0;
  logic rd_en, exec_valid, loop_wrap;
  logic [5:0] rd_addr, exec_addr;
  int checks = 0, failures = 0, wraps = 0;

  rdpp_sequencer #(.DEPTH(D)) dut (.clk, .rst_n, .start, .stop, .loop_start, .loop_end,
                                   .rd_en, .rd_addr, .exec_valid, .exec_addr, .loop_wrap);

  always #5 clk = ~clk;
  always @(posedge clk) if (loop_wrap) wraps++;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(int ls, int le, int cycles);
    int exp, prev_rd;
    loop_start = 6'(ls); loop_end = 6'(le);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // first cycle after start: fetching address 0, nothing executes yet
    checks++;
    if (!rd_en || rd_addr != 0 || exec_valid) begin failures++; $display("FAIL first fetch"); end
    exp = 0;
    for (int c = 0; c < cycles; c++) begin
      prev_rd = rd_addr;
      @(negedge clk);
      checks++;
      if (!exec_valid || exec_addr != 6'(exp) || prev_rd != exp) begin
        failures++;
        $display("FAIL ls=%0d le=%0d cycle %0d exec=%0d exp=%0d", ls, le, c, exec_addr, exp);
      end
      exp = (exp == le) ? ls : exp + 1;
    end
    stop = 1;
    @(negedge clk); stop = 0;
    @(negedge clk);
    checks++;
    if (exec_valid || rd_en) begin failures++; $display("FAIL stop"); end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    checks++; if (exec_valid || rd_en) begin failures++; $display("FAIL idle after reset"); end
    run_case(2, 9, 40);
    run_case(5, 5, 12);
    run_case(0, 62, 150);
    checks++;
    // wraps are counted on fetch, one cycle ahead of execution: 4 + 8 + 2
    if (wraps != 14) begin failures++; $display("FAIL loop wraps %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
