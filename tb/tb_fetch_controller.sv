// tb_fetch_controller: self-checking test of the fetch access flow.
// The testbench plays the predictor, both caches and the next memory level:
// for each request it chooses the prediction, whether the filter cache and
// the L1 cache hold the line, and a memory latency, then checks
//   * the instruction returned (each level returns a fixed function of the
//     address, so a wrong source shows as a wrong word),
//   * the latency from acceptance to rsp_valid: 1 for a correct hit
//     prediction, L1_CYCLES for a predicted miss, 1 + L1_CYCLES for a
//     mispredicted hit, plus 1 + the memory latency after an L1 miss,
//   * exactly one acc_done per access with the right address, outcome and
//     source, the filter-cache fill on every L1 or memory access, the L1
//     fill after every memory access, and a line-aligned memory address,
//   * back-to-back filter-cache hits accepted on consecutive cycles.
// Each of the four prediction cases and the L1 miss is counted and must
// occur.
module tb_fetch_controller;
  import fc_pkg::*;
  localparam int unsigned L1C = 2;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       req_valid, req_ready, rsp_valid;
  addr_t      req_pc;
  instr_t     rsp_instr;
  logic       pred_hit, acc_done, acc_fc_hit;
  addr_t      acc_pc;
  fetch_src_e acc_src;
  addr_t      fc_addr, fc_fill_addr, l1_addr, l1_fill_addr, mem_addr;
  logic       fc_hit, fc_fill_en, l1_hit, l1_fill_en, mem_req, mem_valid;
  instr_t     fc_word;
  line_t      fc_fill_line, l1_line, l1_fill_line, mem_line;

  fetch_controller #(.L1_CYCLES(L1C)) dut (.*);

  always #5 clk = ~clk;

  // Each level returns a different function of the address.
  function automatic instr_t word_of(addr_t a, int lvl);
    return (a * 32'h9E37_79B1) ^ (32'h1111_1111 * (lvl + 1));
  endfunction
  function automatic line_t line_of(addr_t a, int lvl);
    line_t l;
    addr_t base = {a[ADDR_W-1:OFFSET_W], OFFSET_W'(0)};
    for (int w = 0; w < LINE_BYTES / 4; w++) l[w*32 +: 32] = word_of(base + addr_t'(4 * w), lvl);
    return l;
  endfunction

  int checks = 0, failures = 0;
  int n_ok_hit = 0, n_ok_miss = 0, n_bad_hit = 0, n_bad_miss = 0, n_l1_miss = 0, n_b2b = 0;
  bit cur_p, cur_f, cur_l;
  addr_t cur_pc;
  int ml = 1, mcnt = 0;
  int n_acc = 0, n_fcfill = 0, n_l1fill = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pc=%h p=%0b f=%0b l=%0b", what, cur_pc, cur_p, cur_f, cur_l);
    end
  endtask

  // cache and memory models
  assign fc_hit  = cur_f;
  assign fc_word = word_of(fc_addr, 0);
  assign l1_hit  = cur_l;
  assign l1_line = line_of(l1_addr, 1);
  assign mem_line = line_of(mem_addr, 2);
  assign pred_hit = cur_p;

  always_ff @(posedge clk) begin
    mem_valid <= 1'b0;
    if (mem_req && !mem_valid) begin
      if (mcnt == ml - 1) begin mem_valid <= 1'b1; mcnt <= 0; end
      else mcnt <= mcnt + 1;
    end
  end

  // monitors
  always @(posedge clk) if (rst_n) begin
    if (acc_done) begin
      n_acc++;
      check(acc_pc == cur_pc, "acc_pc");
      check(acc_fc_hit == cur_f, "acc_fc_hit");
      check(acc_src == (cur_p && cur_f ? FROM_FC : (cur_l ? FROM_L1 : FROM_MEM)), "acc_src");
    end
    if (fc_fill_en) begin
      n_fcfill++;
      check(fc_fill_addr == cur_pc, "fc fill address");
      check(fc_fill_line == (cur_l ? line_of(cur_pc, 1) : line_of(cur_pc, 2)), "fc fill line");
    end
    if (l1_fill_en) begin
      n_l1fill++;
      check(l1_fill_addr == cur_pc && l1_fill_line == line_of(cur_pc, 2), "l1 fill");
    end
    if (mem_req) check(mem_addr[OFFSET_W-1:0] == '0 && mem_addr[ADDR_W-1:OFFSET_W] == cur_pc[ADDR_W-1:OFFSET_W], "mem address");
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, exp_lat, prev_fc_hit, acc_cycle, last_acc_cycle, cyc;
    rst_n = 1'b0; req_valid = 1'b0; req_pc = '0;
    cur_p = 0; cur_f = 0; cur_l = 0; cur_pc = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(req_ready && !rsp_valid && !mem_req, "idle after reset");
    cyc = 0; last_acc_cycle = -10; prev_fc_hit = 0;
    for (int i = 0; i < 3000; i++) begin
      int a0, f0, l0;
      // choose the case; runs of correct hits test back-to-back issue
      cur_p  = ($urandom_range(0, 2) != 0);
      cur_f  = ($urandom_range(0, 2) != 0);
      cur_l  = ($urandom_range(0, 3) != 0);
      ml     = $urandom_range(1, 6);
      cur_pc = {$urandom_range(0, 32'h3FFF), 2'b00};
      a0 = n_acc; f0 = n_fcfill; l0 = n_l1fill;
      req_valid = 1'b1;
      req_pc    = cur_pc;
      check(req_ready, "ready when idle");
      @(posedge clk); cyc++;
      acc_cycle = cyc;
      if (cur_p && cur_f && prev_fc_hit && acc_cycle == last_acc_cycle + 1) n_b2b++;
      lat = 0;
      do begin
        @(negedge clk);
        req_valid = 1'b0;
        lat++;
        if (!rsp_valid) begin @(posedge clk); cyc++; end
      end while (!rsp_valid && lat < 100);
      exp_lat = (cur_p && cur_f) ? 1 : ((cur_p ? 1 + L1C : L1C) + (cur_l ? 0 : 1 + ml));
      check(lat == exp_lat, $sformatf("latency %0d, expected %0d", lat, exp_lat));
      check(rsp_instr == ((cur_p && cur_f) ? word_of(cur_pc, 0) : word_of(cur_pc, cur_l ? 1 : 2)), "instruction");
      // acc_done of this access happened before or at this response
      check(n_acc == a0 + 1, "one acc_done");
      check(n_fcfill == f0 + ((cur_p && cur_f) ? 0 : 1), "fc fill count");
      check(n_l1fill == l0 + ((cur_p && cur_f) || cur_l ? 0 : 1), "l1 fill count");
      if (cur_p && cur_f) n_ok_hit++;
      else if (cur_p) n_bad_hit++;
      else if (cur_f) n_bad_miss++;
      else n_ok_miss++;
      if (!(cur_p && cur_f) && !cur_l) n_l1_miss++;
      prev_fc_hit = cur_p && cur_f;
      last_acc_cycle = acc_cycle;
    end
    check(n_ok_hit > 0 && n_ok_miss > 0 && n_bad_hit > 0 && n_bad_miss > 0 && n_l1_miss > 0 && n_b2b > 0,
          "every case seen");
    $display("correct-hit=%0d correct-miss=%0d mispredicted-hit=%0d mispredicted-miss=%0d l1-miss=%0d back-to-back=%0d",
             n_ok_hit, n_ok_miss, n_bad_hit, n_bad_miss, n_l1_miss, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
