// pattern_history_table: the look-up table of the pattern predictor.
//
// 2**HIST_BITS saturating counters of CNT_BITS bits, indexed by the global
// hit/miss history. A read returns the counter and a hit prediction, which
// is true when the counter is above THRESHOLD. An update counts the selected
// counter up when the access hit the filter cache and down when it missed,
// saturating at both ends, as in a two-level adaptive branch predictor.
// Defaults follow the evaluated configuration: 5 history bits (32 entries),
// 2-bit counters and a threshold of 2. The strict "above" comparison follows
// the prediction flow chart ("Value > Threshold"), so only a saturated 2-bit
// counter predicts a hit.
//
// Interface: rd_idx is looked up combinationally. upd_en/upd_idx/upd_hit
// write at the rising edge. When a read and an update hit the same entry in
// one cycle, the read returns the updated value (write-through bypass), so
// a prediction made right after an outcome sees that outcome.
// Reset sets every counter to CNT_INIT (default 2, one step below a hit
// prediction); the reset value is a choice of this design.
module pattern_history_table #(
  parameter int unsigned HIST_BITS = 5,
  parameter int unsigned CNT_BITS  = 2,
  parameter int unsigned THRESHOLD = 2,
  parameter int unsigned CNT_INIT  = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [HIST_BITS-1:0] rd_idx,
  output logic [CNT_BITS-1:0]  rd_cnt,
  output logic                 rd_pred_hit,
  input  logic                 upd_en,
  input  logic [HIST_BITS-1:0] upd_idx,
  input  logic                 upd_hit
);

  localparam int unsigned ENTRIES = 2 ** HIST_BITS;
  localparam logic [CNT_BITS-1:0] CNT_MAX = '1;

  logic [CNT_BITS-1:0] cnt_q [ENTRIES];
  logic [CNT_BITS-1:0] upd_old, upd_new;

  // Saturating counter step for the entry being updated.
  always_comb begin
    upd_old = cnt_q[upd_idx];
    upd_new = upd_old;
    if (upd_hit) begin
      if (upd_old != CNT_MAX) upd_new = upd_old + 1'b1;
    end else begin
      if (upd_old != '0)      upd_new = upd_old - 1'b1;
    end
  end

  always_comb begin
    if (upd_en && upd_idx == rd_idx) rd_cnt = upd_new;
    else                             rd_cnt = cnt_q[rd_idx];
    rd_pred_hit = (int'(rd_cnt) > int'(THRESHOLD));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) cnt_q[i] <= CNT_BITS'(CNT_INIT);
    end else if (upd_en) begin
      cnt_q[upd_idx] <= upd_new;
    end
  end

endmodule
