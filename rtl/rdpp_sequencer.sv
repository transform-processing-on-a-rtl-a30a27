// rdpp_sequencer: instruction sequencing with the simple loop mechanism.
//
// There are no branches: one instruction is issued every clock. A `start`
// pulse begins execution at address 0; after the instruction at `loop_end`
// the address returns to `loop_start`, so the group loop_start..loop_end
// repeats indefinitely (words before loop_start run once, as a preamble).
// `stop` ends execution. Start address 0, the two loop-bound inputs and the
// stop input are this design's choices; the description only asks for a
// loop that repeats a group of instructions without end.
//
// Timing: `rd_en`/`rd_addr` address the control store in the cycle before
// the instruction executes; `exec_valid`/`exec_addr` name the instruction
// that the data path executes in the current cycle (the one now in the
// control store's output register).
module rdpp_sequencer #(
  parameter int unsigned DEPTH = rdpp_pkg::RDPP_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     stop,
  input  logic [$clog2(DEPTH)-1:0] loop_start,
  input  logic [$clog2(DEPTH)-1:0] loop_end,
  output logic                     rd_en,
  output logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic                     exec_valid,
  output logic [$clog2(DEPTH)-1:0] exec_addr,
  output logic                     loop_wrap     // pulses when the loop closes
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic          running;
  logic [AW-1:0] pc;

  assign rd_en     = running;
  assign rd_addr   = pc;
  assign loop_wrap = running && (pc == loop_end);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running    <= 1'b0;
      pc         <= '0;
      exec_valid <= 1'b0;
      exec_addr  <= '0;
    end else begin
      exec_valid <= running;
      exec_addr  <= pc;
      if (stop) begin
        running <= 1'b0;
      end else if (start) begin
        running <= 1'b1;
        pc      <= '0;
      end else if (running) begin
        pc <= (pc == loop_end) ? loop_start : pc + AW'(1);
      end
    end
  end

  // The loop must be a forward range; otherwise the address would run past
  // loop_end through the whole store.
  a_loop_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 running |-> loop_start <= loop_end)
    else $error("loop_start %0d is above loop_end %0d", loop_start, loop_end);
endmodule
