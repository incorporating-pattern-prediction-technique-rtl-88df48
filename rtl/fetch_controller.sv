// fetch_controller: steers each instruction fetch to the filter cache or to
// the L1 cache according to the prediction made for it.
//
// It follows the left half of the prediction flow chart:
//   * predicted hit: the filter cache is read. On a hit the instruction is
//     returned after one cycle. On a miss (hit mispredicted) the L1 cache is
//     then read, which costs the filter-cache cycle on top of the L1 access.
//   * predicted miss: the L1 cache is read straight away, skipping the
//     filter cache.
//   * whenever the L1 cache is read, its line is transferred into the filter
//     cache; when the L1 cache misses too, the line is first fetched from the
//     next memory level and written into both caches.
//   * the outcome (was the line in the filter cache when the access began)
//     is reported to the predictor, which updates its history and table and
//     predicts the next access.
// The outcome of a predicted-miss access is taken from the filter cache's
// tag compare alone, which this design performs when the access begins (the
// filter-cache data is not used); the document does not say how the outcome
// of a predicted miss is learnt.
//
// Timing (choices of this design; the document gives no cycle counts): a
// filter-cache access takes 1 cycle, an L1 access L1_CYCLES cycles (at least
// 2). From the cycle a request is accepted to the cycle rsp_valid is high:
//   correct hit prediction ........ 1 cycle
//   predicted miss, L1 hit ........ L1_CYCLES cycles
//   mispredicted hit, L1 hit ...... 1 + L1_CYCLES cycles
//   L1 miss ....................... add the memory latency, counted from
//                                   the cycle mem_req rises to mem_valid
// Requests use a valid/ready handshake (req_ready is high only when idle),
// so back-to-back filter-cache hits sustain one instruction per cycle.
// rsp_valid is a one-cycle pulse with rsp_instr. The memory port holds
// mem_req and mem_addr (line aligned) until the memory answers with a
// one-cycle mem_valid and the whole line.
module fetch_controller
  import fc_pkg::*;
#(
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
  // predictor
  input  logic       pred_hit,
  output logic       acc_done,
  output addr_t      acc_pc,
  output logic       acc_fc_hit,
  output fetch_src_e acc_src,
  // filter cache
  output addr_t      fc_addr,
  input  logic       fc_hit,
  input  instr_t     fc_word,
  output logic       fc_fill_en,
  output addr_t      fc_fill_addr,
  output line_t      fc_fill_line,
  // L1 cache
  output addr_t      l1_addr,
  input  logic       l1_hit,
  input  line_t      l1_line,
  output logic       l1_fill_en,
  output addr_t      l1_fill_addr,
  output line_t      l1_fill_line,
  // next memory level
  output logic       mem_req,
  output addr_t      mem_addr,
  input  logic       mem_valid,
  input  line_t      mem_line
);

  typedef enum logic [1:0] {S_IDLE, S_L1, S_MEM} state_e;

  state_e     state_q;
  addr_t      pc_q;
  logic       fc_hit_q;
  logic [7:0] cnt_q;
  logic       rsp_valid_q;
  instr_t     rsp_instr_q;

  localparam logic [7:0] L1_WAIT_MISPRED = 8'(L1_CYCLES - 1);
  localparam logic [7:0] L1_WAIT_PRED    = 8'(L1_CYCLES - 2);

  initial assert (L1_CYCLES >= 2)
    else $error("fetch_controller: L1_CYCLES must be at least 2");

  assign req_ready = (state_q == S_IDLE);
  assign rsp_valid = rsp_valid_q;
  assign rsp_instr = rsp_instr_q;

  assign fc_addr      = req_pc;
  assign l1_addr      = pc_q;
  assign fc_fill_addr = pc_q;
  assign l1_fill_addr = pc_q;
  assign l1_fill_line = mem_line;
  assign fc_fill_line = (state_q == S_MEM) ? mem_line : l1_line;
  assign mem_req      = (state_q == S_MEM);
  assign mem_addr     = {pc_q[ADDR_W-1:OFFSET_W], OFFSET_W'(0)};

  // Completion of an access and its report to the predictor.
  always_comb begin
    acc_done   = 1'b0;
    acc_pc     = pc_q;
    acc_fc_hit = fc_hit_q;
    acc_src    = FROM_L1;
    fc_fill_en = 1'b0;
    l1_fill_en = 1'b0;
    unique case (state_q)
      S_IDLE: begin
        acc_pc     = req_pc;
        acc_fc_hit = fc_hit;
        acc_src    = FROM_FC;
        acc_done   = req_valid && pred_hit && fc_hit;
      end
      S_L1: begin
        if (cnt_q == '0 && l1_hit) begin
          acc_done   = 1'b1;
          fc_fill_en = 1'b1;
        end
      end
      S_MEM: begin
        acc_src = FROM_MEM;
        if (mem_valid) begin
          acc_done   = 1'b1;
          fc_fill_en = 1'b1;
          l1_fill_en = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      pc_q        <= '0;
      fc_hit_q    <= 1'b0;
      cnt_q       <= '0;
      rsp_valid_q <= 1'b0;
      rsp_instr_q <= '0;
    end else begin
      rsp_valid_q <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (req_valid) begin
            pc_q     <= req_pc;
            fc_hit_q <= fc_hit;
            if (pred_hit && fc_hit) begin
              rsp_valid_q <= 1'b1;
              rsp_instr_q <= fc_word;
            end else begin
              state_q <= S_L1;
              cnt_q   <= pred_hit ? L1_WAIT_MISPRED : L1_WAIT_PRED;
            end
          end
        end
        S_L1: begin
          if (cnt_q != '0) begin
            cnt_q <= cnt_q - 1'b1;
          end else if (l1_hit) begin
            rsp_valid_q <= 1'b1;
            rsp_instr_q <= line_word(l1_line, pc_q);
            state_q     <= S_IDLE;
          end else begin
            state_q <= S_MEM;
          end
        end
        S_MEM: begin
          if (mem_valid) begin
            rsp_valid_q <= 1'b1;
            rsp_instr_q <= line_word(mem_line, pc_q);
            state_q     <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The memory answers only a pending request.
  a_mem_valid_needs_req: assert property (
    @(posedge clk) disable iff (!rst_n) mem_valid |-> mem_req
  );

endmodule
