// tb_fetch_unit: end-to-end test of the fetch path at its default size
// (512 B filter cache, 8 KB 32-way L1, 5-bit history, 32-entry table).
//
// The testbench acts as the processor core. It generates an instruction
// address stream shaped like embedded code: short loops inside one line,
// loops that fit in the filter cache, loops larger than the filter cache,
// a loop calling a routine that conflicts with it in the filter cache,
// long sequential sweeps larger than the L1 cache, and random jumps. Each
// request is issued as soon as the previous one has answered (sometimes
// after an idle gap). The memory behind the L1 is the behavioural
// next_level_memory.
//
// An independent reference model in the testbench (direct-mapped filter
// cache tags, round-robin L1 tags, same-line rule, history register and
// counter table) predicts for every access the prediction and its source,
// whether the line is in the filter cache, which level answers and the
// latency; all of these, the returned instruction and the history are
// checked. Every mechanism (the four prediction outcomes, L1 miss, filter
// cache replacement, L1 eviction, same-line and table predictions of both
// kinds, back-to-back issue) is counted and must occur. Prediction accuracy
// per phase is printed.
module tb_fetch_unit;
  import fc_pkg::*;
  localparam int unsigned L1C     = 2;   // fetch_unit default L1_CYCLES
  localparam int unsigned MEM_LAT = 4;
  localparam int unsigned FC_LINES = 512 / LINE_BYTES;
  localparam int unsigned L1_WAYS  = 32;
  localparam int unsigned L1_SETS  = 8192 / (LINE_BYTES * L1_WAYS);

  logic       clk = 1'b0;
  logic       rst_n;
  logic       req_valid, req_ready, rsp_valid;
  addr_t      req_pc;
  instr_t     rsp_instr;
  logic       mem_req, mem_valid;
  addr_t      mem_addr;
  line_t      mem_line;
  logic       acc_done, acc_pred_hit, acc_fc_hit;
  addr_t      acc_pc;
  pred_src_e  acc_pred_src;
  fetch_src_e acc_src;
  logic [4:0] pred_hist;
  int         mem_reqs;

  fetch_unit dut (.*);

  next_level_memory #(.LATENCY(MEM_LAT)) u_mem (
    .clk(clk), .rst_n(rst_n), .mem_req(mem_req), .mem_addr(mem_addr),
    .mem_valid(mem_valid), .mem_line(mem_line), .req_count(mem_reqs)
  );

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  bit    m_fc_v [FC_LINES];
  addr_t m_fc_l [FC_LINES];
  bit    m_l1_v [L1_SETS][L1_WAYS];
  addr_t m_l1_l [L1_SETS][L1_WAYS];
  int    m_l1_rr [L1_SETS];
  bit [4:0] m_hist, m_idx;
  int    m_pht [32];
  bit    m_pred, m_src_pht;

  // mechanism counters
  int n_ok_hit, n_ok_miss, n_bad_hit, n_bad_miss, n_l1_miss, n_fc_repl, n_l1_evict;
  int n_same, n_pht_hit, n_pht_miss, n_b2b, n_gap;
  int checks = 0, failures = 0;
  int ph_acc, ph_ok;

  function automatic instr_t mem_word(addr_t a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic bit fc_has(addr_t pc);
    int i = int'(pc[OFFSET_W +: $clog2(FC_LINES)]);
    return m_fc_v[i] && m_fc_l[i] == (pc >> OFFSET_W);
  endfunction

  function automatic bit l1_has(addr_t pc);
    int s = int'(pc[OFFSET_W +: $clog2(L1_SETS)]);
    for (int w = 0; w < L1_WAYS; w++)
      if (m_l1_v[s][w] && m_l1_l[s][w] == (pc >> OFFSET_W)) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %t", what, $time);
    end
  endtask

  // ---------------- driver ----------------
  bit prev_fc;
  int last_acc_cyc, cyc;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic fetch(addr_t pc);
    bit p, f, l;
    int lat, exp_lat, i, s, acc_cyc;
    fetch_src_e exp_src;
    p = m_pred; f = fc_has(pc); l = l1_has(pc);
    exp_src = (p && f) ? FROM_FC : (l ? FROM_L1 : FROM_MEM);
    exp_lat = (p && f) ? 1 : ((p ? 1 + L1C : L1C) + (l ? 0 : 1 + MEM_LAT));
    // occasional idle gap between fetches
    if ($urandom_range(0, 49) == 0) begin
      repeat ($urandom_range(1, 3)) @(negedge clk);
      n_gap++;
    end
    req_valid = 1'b1;
    req_pc    = pc;
    check(req_ready, "ready between fetches");
    // the access outcome is visible before the accepting edge for a hit
    @(posedge clk);
    acc_cyc = cyc;
    if (p && f && prev_fc && acc_cyc == last_acc_cyc + 1) n_b2b++;
    lat = 0;
    do begin
      if (acc_done) begin
        check(acc_pc == pc, "acc_pc");
        check(acc_pred_hit == p, "prediction");
        check((acc_pred_src == SRC_PHT) == m_src_pht, "prediction source");
        check(acc_fc_hit == f, "filter cache outcome");
        check(acc_src == exp_src, "answering level");
      end
      @(negedge clk);
      req_valid = 1'b0;
      lat++;
      if (!rsp_valid) @(posedge clk);
    end while (!rsp_valid && lat < 200);
    check(lat == exp_lat, $sformatf("latency %0d expected %0d pc=%h", lat, exp_lat, pc));
    check(rsp_instr == mem_word(pc), "instruction");

    // update the reference model
    ph_acc++;
    if (p == f) ph_ok++;
    if (p && f) n_ok_hit++;
    else if (p) n_bad_hit++;
    else if (f) n_bad_miss++;
    else n_ok_miss++;
    if (!(p && f)) begin
      if (!l) begin
        n_l1_miss++;
        s = int'(pc[OFFSET_W +: $clog2(L1_SETS)]);
        if (m_l1_v[s][m_l1_rr[s]]) n_l1_evict++;
        m_l1_v[s][m_l1_rr[s]] = 1'b1;
        m_l1_l[s][m_l1_rr[s]] = pc >> OFFSET_W;
        m_l1_rr[s] = (m_l1_rr[s] + 1) % L1_WAYS;
      end
      i = int'(pc[OFFSET_W +: $clog2(FC_LINES)]);
      if (m_fc_v[i] && m_fc_l[i] != (pc >> OFFSET_W)) n_fc_repl++;
      m_fc_v[i] = 1'b1;
      m_fc_l[i] = pc >> OFFSET_W;
    end
    if (m_src_pht) begin
      m_pht[m_idx] = f ? ((m_pht[m_idx] == 3) ? 3 : m_pht[m_idx] + 1)
                       : ((m_pht[m_idx] == 0) ? 0 : m_pht[m_idx] - 1);
      m_hist = {m_hist[3:0], f};
    end
    m_idx = m_hist;
    if (pc[OFFSET_W-1:2] != '1) begin
      m_pred = 1'b1; m_src_pht = 1'b0; n_same++;
    end else begin
      m_pred = (m_pht[m_hist] > 2); m_src_pht = 1'b1;
      if (m_pred) n_pht_hit++; else n_pht_miss++;
    end
    check(pred_hist == m_hist, "history register");
    prev_fc = p && f;
    last_acc_cyc = acc_cyc;
  endtask

  // straight-line run of n instructions from pc
  task automatic run(addr_t pc, int n);
    for (int k = 0; k < n; k++) fetch(pc + addr_t'(4 * k));
  endtask

  task automatic phase_report(string name);
    $display("phase %-28s accesses=%0d prediction accuracy=%0d.%02d%%", name, ph_acc,
             (ph_ok * 100) / ph_acc, ((ph_ok * 10000) / ph_acc) % 100);
    ph_acc = 0; ph_ok = 0;
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; req_valid = 1'b0; req_pc = '0; cyc = 0;
    n_ok_hit = 0; n_ok_miss = 0; n_bad_hit = 0; n_bad_miss = 0; n_l1_miss = 0;
    n_fc_repl = 0; n_l1_evict = 0; n_same = 0; n_pht_hit = 0; n_pht_miss = 0;
    n_b2b = 0; n_gap = 0; ph_acc = 0; ph_ok = 0; prev_fc = 0; last_acc_cyc = -10;
    for (int i = 0; i < FC_LINES; i++) m_fc_v[i] = 1'b0;
    for (int s = 0; s < L1_SETS; s++) begin
      m_l1_rr[s] = 0;
      for (int w = 0; w < L1_WAYS; w++) m_l1_v[s][w] = 1'b0;
    end
    for (int i = 0; i < 32; i++) m_pht[i] = 2;
    m_hist = '0; m_idx = '0; m_pred = 1'b0; m_src_pht = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1: tight loop inside one line and across a line boundary
    for (int it = 0; it < 200; it++) run(32'h0000_1000, 6);
    for (int it = 0; it < 200; it++) run(32'h0000_1038, 6);
    phase_report("small loops");

    // 2: 320 B loop body, fits in the filter cache
    for (int it = 0; it < 100; it++) run(32'h0000_2000, 80);
    phase_report("loop fits filter cache");

    // 3: 768 B loop body, larger than the filter cache
    for (int it = 0; it < 60; it++) run(32'h0000_3000, 192);
    phase_report("loop exceeds filter cache");

    // 4: loop calling a routine that maps onto the same filter-cache lines
    for (int it = 0; it < 150; it++) begin
      run(32'h0000_4000, 20);
      run(32'h0000_4200, 24);   // 512 B away: same filter-cache index
      run(32'h0000_4050, 8);
    end
    phase_report("loop with conflicting call");

    // 5: sequential sweep over 20 KB, more than the L1 cache, twice
    for (int it = 0; it < 2; it++) run(32'h0001_0000, 5120);
    phase_report("sweep larger than L1");

    // 6: nested loops with data-dependent exits and random far jumps
    for (int it = 0; it < 300; it++) begin
      run(32'h0000_5000, 12 + 4 * $urandom_range(0, 3));
      if ($urandom_range(0, 3) == 0) run(32'h0000_6000 + addr_t'(256 * $urandom_range(0, 15)), 10);
      run(32'h0000_5100, 16);
    end
    phase_report("branchy code");

    $display("correct-hit=%0d correct-miss=%0d mispredicted-hit=%0d mispredicted-miss=%0d",
             n_ok_hit, n_ok_miss, n_bad_hit, n_bad_miss);
    $display("l1-miss=%0d (memory requests %0d) fc-replacement=%0d l1-eviction=%0d",
             n_l1_miss, mem_reqs, n_fc_repl, n_l1_evict);
    $display("same-line-prediction=%0d table-hit-prediction=%0d table-miss-prediction=%0d back-to-back=%0d idle-gaps=%0d",
             n_same, n_pht_hit, n_pht_miss, n_b2b, n_gap);
    check(mem_reqs == n_l1_miss, "memory requests equal L1 misses");
    check(n_ok_hit > 0, "correct hit prediction happened");
    check(n_ok_miss > 0, "correct miss prediction happened");
    check(n_bad_hit > 0, "mispredicted hit happened");
    check(n_bad_miss > 0, "mispredicted miss happened");
    check(n_l1_miss > 0, "L1 miss happened");
    check(n_fc_repl > 0, "filter cache replacement happened");
    check(n_l1_evict > 0, "L1 eviction happened");
    check(n_same > 0 && n_pht_hit > 0 && n_pht_miss > 0, "all prediction sources happened");
    check(n_b2b > 0, "back-to-back filter cache hits happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
