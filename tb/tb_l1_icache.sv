// tb_l1_icache: self-checking test of the set-associative L1 cache at its
// full size (8 KB, 32 B lines, 32 ways, 8 sets). Lines whose contents are a
// fixed function of their address are filled; a reference model in the
// testbench (per-set way array with a round-robin victim pointer) predicts
// hit or miss of random lookups, and a hit must return the whole line the
// address function gives. The test fills more than 32 lines into single
// sets so that round-robin eviction is exercised, and checks the cache is
// empty after reset.
module tb_l1_icache;
  import fc_pkg::*;
  localparam int unsigned SIZE = 8192;
  localparam int unsigned WAYS = 32;
  localparam int unsigned SETS = SIZE / (LINE_BYTES * WAYS);

  logic  clk = 1'b0;
  logic  rst_n;
  addr_t rd_addr, fill_addr;
  logic  hit, fill_en;
  line_t rd_line, fill_line;

  bit    m_valid [SETS][WAYS];
  addr_t m_tag   [SETS][WAYS];
  int    m_rr    [SETS];
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_evict = 0;

  l1_icache #(.SIZE_BYTES(SIZE), .WAYS(WAYS)) dut (.*);

  always #5 clk = ~clk;

  function automatic line_t line_of(addr_t a);
    line_t l;
    addr_t base = {a[ADDR_W-1:OFFSET_W], OFFSET_W'(0)};
    for (int w = 0; w < LINE_BYTES / 4; w++)
      l[w*32 +: 32] = ((base + addr_t'(4 * w)) * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
    return l;
  endfunction

  function automatic bit m_hit(addr_t a);
    int s = int'(a[OFFSET_W +: $clog2(SETS)]);
    for (int w = 0; w < WAYS; w++)
      if (m_valid[s][w] && m_tag[s][w] == (a >> OFFSET_W)) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: addr=%h hit=%0b", what, rd_addr, hit);
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
    rst_n = 1'b0; fill_en = 1'b0; fill_addr = '0; fill_line = '0; rd_addr = '0;
    for (int s = 0; s < SETS; s++) begin
      m_rr[s] = 0;
      for (int w = 0; w < WAYS; w++) m_valid[s][w] = 1'b0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); rd_addr = addr_t'(i * LINE_BYTES);
      #1 check(!hit, "empty after reset");
    end
    for (int i = 0; i < 20000; i++) begin
      bit exp_hit;
      @(negedge clk);
      // a 16 KB window: 64 candidate lines per set, twice the associativity
      rd_addr   = {$urandom_range(0, 4095), 2'b00};
      fill_en   = !m_hit(rd_addr) && ($urandom_range(0, 1) == 1);
      fill_addr = rd_addr;
      fill_line = line_of(fill_addr);
      exp_hit   = m_hit(rd_addr);
      #1;
      check(hit == exp_hit, "hit");
      if (exp_hit) begin
        check(rd_line == line_of(rd_addr), "line");
        n_hit++;
      end else n_miss++;
      @(posedge clk);
      if (fill_en) begin
        int s;
        s = int'(fill_addr[OFFSET_W +: $clog2(SETS)]);
        if (m_valid[s][m_rr[s]]) n_evict++;
        m_valid[s][m_rr[s]] = 1'b1;
        m_tag[s][m_rr[s]]   = fill_addr >> OFFSET_W;
        m_rr[s] = (m_rr[s] + 1) % WAYS;
      end
    end
    check(n_hit > 0 && n_miss > 0 && n_evict > 0, "hits, misses and evictions seen");
    $display("hits=%0d misses=%0d evictions=%0d", n_hit, n_miss, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
