// pattern_predictor: predicts whether the next instruction fetch will find
// its line in the filter cache.
//
// The next fetch address is assumed to be the current one plus 4 (most
// branches are assumed not taken). When an access to pc completes:
//   * if pc and pc+4 lie in the same cache line, the next access is
//     predicted to hit the filter cache (the line has just been used);
//   * otherwise the line changes: the pattern history table entry selected
//     by the global hit/miss history is read, and the next access is
//     predicted to hit if that counter is above the threshold.
// When the outcome of a table-based prediction is known (the next access
// completes and reports whether its line was in the filter cache), the
// table entry that made the prediction is trained and the outcome is shifted
// into the history. Predictions from the same-line rule do not touch the
// history or the table: the table is only consulted on line changes. This
// follows the prediction flow chart and the two-level (GAg) predictor
// description; training only table-based predictions is how this design
// reads "we access the predictor only when cache line changes are
// encountered".
//
// Interface: acc_done pulses for one cycle when an access completes, with
// acc_pc its address and acc_fc_hit its filter-cache outcome. pred_hit is
// the registered prediction for the next access; it changes at the edge
// after acc_done, so a new access can start in the very next cycle. The
// history and the table are updated at that same edge, and the new
// prediction already uses them (history and table bypass). After reset the
// prediction is "miss", as the filter cache is empty (a choice of this
// design).
module pattern_predictor
  import fc_pkg::*;
#(
  parameter int unsigned HIST_BITS  = 5,
  parameter int unsigned CNT_BITS   = 2,
  parameter int unsigned THRESHOLD  = 2,
  parameter int unsigned CNT_INIT   = 2,
  parameter int unsigned LINE_SIZE  = fc_pkg::LINE_BYTES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 acc_done,
  input  addr_t                acc_pc,
  input  logic                 acc_fc_hit,
  output logic                 pred_hit,
  output pred_src_e            pred_src,
  output logic [HIST_BITS-1:0] hist
);

  localparam int unsigned LOFF = $clog2(LINE_SIZE);

  logic [HIST_BITS-1:0] hist_next;
  logic [HIST_BITS-1:0] pred_idx_q;
  logic                 pht_pred_hit;
  logic                 train;
  logic                 same_line;
  addr_t                next_pc;

  // Only a prediction made from the table is trained by its outcome.
  assign train = acc_done && (pred_src == SRC_PHT);

  history_shift_register #(.HIST_BITS(HIST_BITS)) u_hist (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (train),
    .shift_in (acc_fc_hit),
    .hist     (hist),
    .hist_next(hist_next)
  );

  pattern_history_table #(
    .HIST_BITS(HIST_BITS),
    .CNT_BITS (CNT_BITS),
    .THRESHOLD(THRESHOLD),
    .CNT_INIT (CNT_INIT)
  ) u_pht (
    .clk        (clk),
    .rst_n      (rst_n),
    .rd_idx     (hist_next),
    .rd_cnt     (),
    .rd_pred_hit(pht_pred_hit),
    .upd_en     (train),
    .upd_idx    (pred_idx_q),
    .upd_hit    (acc_fc_hit)
  );

  assign next_pc   = acc_pc + ADDR_W'(4);
  assign same_line = (acc_pc[ADDR_W-1:LOFF] == next_pc[ADDR_W-1:LOFF]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred_hit   <= 1'b0;
      pred_src   <= SRC_SAME_LINE;
      pred_idx_q <= '0;
    end else if (acc_done) begin
      if (same_line) begin
        pred_hit <= 1'b1;
        pred_src <= SRC_SAME_LINE;
      end else begin
        pred_hit <= pht_pred_hit;
        pred_src <= SRC_PHT;
      end
      pred_idx_q <= hist_next;
    end
  end

endmodule
