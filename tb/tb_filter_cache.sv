// tb_filter_cache: self-checking test of the direct-mapped filter cache.
// Lines whose contents are a fixed function of their address are filled at
// random addresses; a reference tag table in the testbench (16 lines of
// 32 B, direct mapped) predicts hit or miss for random lookups, and every
// hit must return the instruction word the address function gives.
// Conflict replacement (a fill over a valid line with another tag) and the
// empty cache after reset, and again after a second reset while the tags
// still hold earlier lines, are checked.
module tb_filter_cache;
  import fc_pkg::*;
  localparam int unsigned SIZE  = 512;
  localparam int unsigned LINES = SIZE / LINE_BYTES;

  logic   clk = 1'b0;
  logic   rst_n;
  addr_t  rd_addr, fill_addr;
  logic   hit, fill_en;
  instr_t rd_word;
  line_t  fill_line;

  bit    m_valid [LINES];
  addr_t m_line  [LINES];
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_evict = 0;

  filter_cache #(.SIZE_BYTES(SIZE)) dut (.*);

  always #5 clk = ~clk;

  function automatic instr_t word_of(addr_t a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic line_t line_of(addr_t a);
    line_t l;
    addr_t base = {a[ADDR_W-1:OFFSET_W], OFFSET_W'(0)};
    for (int w = 0; w < LINE_BYTES / 4; w++) l[w*32 +: 32] = word_of(base + addr_t'(4 * w));
    return l;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: addr=%h hit=%0b word=%h exp=%h", what, rd_addr, hit, rd_word, word_of(rd_addr));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; fill_en = 1'b0; fill_addr = '0; fill_line = '0; rd_addr = '0;
    for (int i = 0; i < LINES; i++) m_valid[i] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < LINES; i++) begin
      @(negedge clk); rd_addr = addr_t'(i * LINE_BYTES);
      #1 check(!hit, "empty after reset");
    end
    for (int i = 0; i < 4000; i++) begin
      int    idx;
      bit    exp_hit;
      @(negedge clk);
      // lookups and fills within a 2 KB window: 4 tags per index
      rd_addr   = {$urandom_range(0, 511), 2'b00};
      fill_en   = ($urandom_range(0, 3) == 0);
      fill_addr = {$urandom_range(0, 511), 2'b00};
      fill_line = line_of(fill_addr);
      idx       = int'(rd_addr[OFFSET_W +: $clog2(LINES)]);
      exp_hit   = m_valid[idx] && (m_line[idx] == (rd_addr >> OFFSET_W));
      #1;
      check(hit == exp_hit, "hit");
      if (exp_hit) begin
        check(rd_word == word_of(rd_addr), "word");
        n_hit++;
      end else n_miss++;
      @(posedge clk);
      if (fill_en) begin
        idx = int'(fill_addr[OFFSET_W +: $clog2(LINES)]);
        if (m_valid[idx] && m_line[idx] != (fill_addr >> OFFSET_W)) n_evict++;
        m_valid[idx] = 1'b1;
        m_line[idx]  = fill_addr >> OFFSET_W;
      end
    end
    check(n_hit > 0 && n_miss > 0 && n_evict > 0, "hits, misses and replacements seen");
    // A second reset must empty the cache although tags and data remain.
    @(negedge clk); fill_en = 1'b0; rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < LINES; i++) begin
      if (m_valid[i]) begin
        rd_addr = m_line[i] << OFFSET_W;
        #1 check(!hit, "empty after second reset");
        m_valid[i] = 1'b0;
      end
    end
    $display("hits=%0d misses=%0d replacements=%0d", n_hit, n_miss, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
