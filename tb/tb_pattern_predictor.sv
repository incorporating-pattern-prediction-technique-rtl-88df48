// tb_pattern_predictor: self-checking test of the filter-cache hit predictor.
// A stream of completed accesses is applied: mostly sequential addresses
// (pc+4) with random jumps, and random filter-cache outcomes biased per
// history pattern so that table counters move in both directions. A
// reference model in the testbench (same-line rule, 5-bit history, 32
// two-bit counters, hit predicted above 2, only table predictions trained)
// predicts every output, which is compared after each access. The counts of
// same-line predictions, table predictions of hit and of miss are checked
// to be non-zero.
module tb_pattern_predictor;
  import fc_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      acc_done, acc_fc_hit;
  addr_t     acc_pc;
  logic      pred_hit;
  pred_src_e pred_src;
  logic [4:0] hist;

  // reference model
  bit [4:0] m_hist, m_idx;
  int       m_pht [32];
  bit       m_pred, m_src_pht;
  int checks = 0, failures = 0;
  int n_same = 0, n_pht_hit = 0, n_pht_miss = 0;

  pattern_predictor #(.HIST_BITS(5), .CNT_BITS(2), .THRESHOLD(2), .CNT_INIT(2), .LINE_SIZE(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pc=%h pred=%0b/%0b src=%0d/%0b hist=%b/%b", what, acc_pc,
               pred_hit, m_pred, pred_src, m_src_pht, hist, m_hist);
    end
  endtask

  task automatic model_step(addr_t pc, bit fc_hit);
    if (m_src_pht) begin
      m_pht[m_idx] = fc_hit ? ((m_pht[m_idx] == 3) ? 3 : m_pht[m_idx] + 1)
                            : ((m_pht[m_idx] == 0) ? 0 : m_pht[m_idx] - 1);
      m_hist = {m_hist[3:0], fc_hit};
    end
    m_idx = m_hist;
    if (pc[4:2] != 3'b111) begin
      m_pred = 1'b1; m_src_pht = 1'b0; n_same++;
    end else begin
      m_pred = (m_pht[m_hist] > 2); m_src_pht = 1'b1;
      if (m_pred) n_pht_hit++; else n_pht_miss++;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t pc;
    rst_n = 1'b0; acc_done = 1'b0; acc_pc = '0; acc_fc_hit = 1'b0;
    m_hist = '0; m_idx = '0; m_pred = 1'b0; m_src_pht = 1'b0;
    for (int i = 0; i < 32; i++) m_pht[i] = 2;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(pred_hit == 1'b0 && pred_src == SRC_SAME_LINE, "reset prediction");
    pc = 32'h0000_1000;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      acc_done = ($urandom_range(0, 4) != 0);
      acc_pc   = pc;
      // Outcome depends on the history so the table learns patterns.
      acc_fc_hit = ($urandom_range(0, 99) < ((m_hist[0] ^ m_hist[2]) ? 90 : 15));
      @(posedge clk);
      if (acc_done) begin
        model_step(pc, acc_fc_hit);
        pc = ($urandom_range(0, 15) == 0) ? {$urandom_range(0, 255), 2'b00} << 2 : pc + 4;
      end
      #1;
      check(pred_hit == m_pred, "prediction");
      check((pred_src == SRC_PHT) == m_src_pht, "prediction source");
      check(hist == m_hist, "history");
    end
    @(negedge clk); acc_done = 1'b0;
    check(n_same > 0 && n_pht_hit > 0 && n_pht_miss > 0, "all prediction kinds seen");
    $display("same-line=%0d table-hit=%0d table-miss=%0d", n_same, n_pht_hit, n_pht_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
