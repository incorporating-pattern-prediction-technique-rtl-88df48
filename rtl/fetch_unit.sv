// fetch_unit: instruction fetch path with a pattern-predicted filter cache.
//
// A small filter cache sits above an L1 instruction cache. Reading the
// filter cache first on every fetch saves energy when it hits but costs a
// cycle when it misses; a predictor therefore decides, fetch by fetch,
// whether to read the filter cache or go straight to the L1 cache. The
// predictor assumes sequential fetch: if the next address (pc+4) is in the
// same line it predicts a hit; on a line change it consults a two-level
// pattern predictor, a 5-bit global shift register of recent filter-cache
// hits and misses indexing a 32-entry table of 2-bit saturating counters.
//
// Blocks: pattern_predictor (history_shift_register + pattern_history_table),
// filter_cache (512 B default), l1_icache (8 KB, 32 B lines, 32 ways) and
// fetch_controller, which implements the access flow and the line transfers.
// The next memory level is outside this module and is reached through the
// mem_* line port.
//
// Interface and timing: see fetch_controller. The acc_* outputs describe
// each completed access (one-cycle acc_done): its address, the prediction it
// used and where that prediction came from, whether its line was in the
// filter cache, and which level supplied the instruction; pred_hist is the global history.
// They exist so that
// prediction accuracy and the use of each level can be counted outside.
module fetch_unit
  import fc_pkg::*;
#(
  parameter int unsigned FC_BYTES  = 512,
  parameter int unsigned L1_BYTES  = 8192,
  parameter int unsigned L1_WAYS   = 32,
  parameter int unsigned HIST_BITS = 5,
  parameter int unsigned CNT_BITS  = 2,
  parameter int unsigned THRESHOLD = 2,
  parameter int unsigned CNT_INIT  = 2,
  parameter int unsigned L1_CYCLES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // core side
  input  logic       req_valid,
  output logic       req_ready,
  input  addr_t      req_pc,
  output logic       rsp_valid,
  output instr_t     rsp_instr,
  // next memory level
  output logic       mem_req,
  output addr_t      mem_addr,
  input  logic       mem_valid,
  input  line_t      mem_line,
  // per-access status
  output logic       acc_done,
  output addr_t      acc_pc,
  output logic       acc_pred_hit,
  output pred_src_e  acc_pred_src,
  output logic       acc_fc_hit,
  output fetch_src_e acc_src,
  // predictor state, for observation
  output logic [HIST_BITS-1:0] pred_hist
);

  logic                 pred_hit;
  pred_src_e            pred_src;

  addr_t  fc_addr, fc_fill_addr, l1_addr, l1_fill_addr;
  logic   fc_hit, fc_fill_en, l1_hit, l1_fill_en;
  instr_t fc_word;
  line_t  fc_fill_line, l1_line, l1_fill_line;

  pattern_predictor #(
    .HIST_BITS (HIST_BITS),
    .CNT_BITS  (CNT_BITS),
    .THRESHOLD (THRESHOLD),
    .CNT_INIT  (CNT_INIT),
    .LINE_SIZE (LINE_BYTES)
  ) u_pred (
    .clk       (clk),
    .rst_n     (rst_n),
    .acc_done  (acc_done),
    .acc_pc    (acc_pc),
    .acc_fc_hit(acc_fc_hit),
    .pred_hit  (pred_hit),
    .pred_src  (pred_src),
    .hist      (pred_hist)
  );

  filter_cache #(.SIZE_BYTES(FC_BYTES)) u_fc (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_addr  (fc_addr),
    .hit      (fc_hit),
    .rd_word  (fc_word),
    .fill_en  (fc_fill_en),
    .fill_addr(fc_fill_addr),
    .fill_line(fc_fill_line)
  );

  l1_icache #(.SIZE_BYTES(L1_BYTES), .WAYS(L1_WAYS)) u_l1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_addr  (l1_addr),
    .hit      (l1_hit),
    .rd_line  (l1_line),
    .fill_en  (l1_fill_en),
    .fill_addr(l1_fill_addr),
    .fill_line(l1_fill_line)
  );

  fetch_controller #(.L1_CYCLES(L1_CYCLES)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .req_valid   (req_valid),
    .req_ready   (req_ready),
    .req_pc      (req_pc),
    .rsp_valid   (rsp_valid),
    .rsp_instr   (rsp_instr),
    .pred_hit    (pred_hit),
    .acc_done    (acc_done),
    .acc_pc      (acc_pc),
    .acc_fc_hit  (acc_fc_hit),
    .acc_src     (acc_src),
    .fc_addr     (fc_addr),
    .fc_hit      (fc_hit),
    .fc_word     (fc_word),
    .fc_fill_en  (fc_fill_en),
    .fc_fill_addr(fc_fill_addr),
    .fc_fill_line(fc_fill_line),
    .l1_addr     (l1_addr),
    .l1_hit      (l1_hit),
    .l1_line     (l1_line),
    .l1_fill_en  (l1_fill_en),
    .l1_fill_addr(l1_fill_addr),
    .l1_fill_line(l1_fill_line),
    .mem_req     (mem_req),
    .mem_addr    (mem_addr),
    .mem_valid   (mem_valid),
    .mem_line    (mem_line)
  );

  // The prediction only changes when an access completes, so the value seen
  // at acc_done is the one this access was steered by.
  assign acc_pred_hit = pred_hit;
  assign acc_pred_src = pred_src;

endmodule
