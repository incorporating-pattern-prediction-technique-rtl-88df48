// history_shift_register: global hit/miss history of the pattern predictor.
//
// Holds the filter-cache outcome (1 = the line was in the filter cache,
// 0 = it was not) of the last HIST_BITS accesses that were predicted through
// the pattern history table. On an update the register shifts left and the
// newest outcome enters bit 0, so bit 0 is the most recent access and bit
// HIST_BITS-1 the oldest; this follows the two-level adaptive predictor
// figure, which shifts left on update with the newest result at the right.
// The 5-bit default is the size used in the evaluation.
//
// Interface: shift_en/shift_in update the register at the rising clock edge.
// hist is the registered value; hist_next is the value it will take at the
// next edge, for a reader that must see this cycle's update (no wait state).
// HIST_BITS must be at least 2.
// Reset clears the history to all zeros (all misses), a choice of this
// design: after reset the filter cache is empty.
module history_shift_register #(
  parameter int unsigned HIST_BITS = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift_en,
  input  logic                 shift_in,
  output logic [HIST_BITS-1:0] hist,
  output logic [HIST_BITS-1:0] hist_next
);

  always_comb begin
    hist_next = hist;
    if (shift_en) hist_next = {hist[HIST_BITS-2:0], shift_in};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hist <= '0;
    else        hist <= hist_next;
  end

endmodule
