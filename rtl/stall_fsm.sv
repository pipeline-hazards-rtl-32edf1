// stall_fsm: the two-state NoStall machine for load/store memory cycles.
//
// Instructions and data share one memory, so a load or store must borrow a
// memory cycle from instruction fetch. One flip-flop holds NoStall. Its next
// value is !(ls && NoStall): when a load or store is about to enter Execute
// (`ls`) while the pipeline is running, NoStall drops for exactly one clock,
// then returns high by itself, because a low NoStall forces the next state
// high. NoStall is the clock enable of the PC and of the pipeline registers;
// while it is low the shared memory serves the data access. The one-flip-flop
// feedback structure with a load|store input comes from the stall drawing;
// taking `ls` from the instruction that is entering Execute, and resetting
// to NoStall = 1, are this design's choices.
module stall_fsm (
  input  logic clk,
  input  logic rst,
  input  logic ls,
  output logic nostall
);

  always_ff @(posedge clk) begin
    if (rst) nostall <= 1'b1;
    else     nostall <= !(ls && nostall);
  end

  // A stall never lasts more than one clock.
  a_one_clock: assert property (@(posedge clk) disable iff (rst) !nostall |=> nostall);

endmodule
