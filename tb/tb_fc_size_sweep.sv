// tb_fc_size_sweep: runs one instruction stream through three fetch paths
// that differ only in filter-cache size, 256 B, 512 B and 1024 B, the three
// sizes the prediction scheme was evaluated at (L1 8 KB, 32 ways, 5-bit
// history in all three).
//
// The stream is generated once: a mix of loops with bodies from 96 B to
// 900 B, a loop calling a routine that conflicts with it in the smaller
// caches, and random short branches. Each path is driven by its own core
// model. For every fetch the testbench checks the instruction (a hash of the
// address, from the behavioural memory), that acc_pc matches, that the
// answering level agrees with the prediction and outcome, that the latency
// matches the level (1 for a filter-cache hit, 2 for a predicted miss, 3 for
// a mispredicted hit, plus 5 after an L1 miss), and that the filter-cache
// outcome matches a direct-mapped tag model of that size. It prints the
// prediction accuracy and the share of fetches served by the filter cache
// for each size, and checks that a larger filter cache never has more
// filter-cache misses on this stream.
module tb_fc_size_sweep;
  import fc_pkg::*;
  localparam int NCFG    = 3;
  localparam int MEM_LAT = 4;
  localparam int L1C     = 2;
  localparam int MAXN    = 260000;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  addr_t stream [MAXN];
  int    n_stream;
  bit    stream_ready = 1'b0;

  int checks [NCFG];
  int fails  [NCFG];
  int n_acc  [NCFG], n_ok [NCFG], n_fc_served [NCFG], n_fc_miss [NCFG];
  bit done   [NCFG];

  function automatic instr_t mem_word(addr_t a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  // ---------------- one fetch path per filter-cache size ----------------
  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int FCB   = 256 << g;
    localparam int LINES = FCB / LINE_BYTES;

    logic       req_valid, req_ready, rsp_valid;
    addr_t      req_pc, mem_addr, acc_pc;
    instr_t     rsp_instr;
    logic       mem_req, mem_valid, acc_done, acc_pred_hit, acc_fc_hit;
    line_t      mem_line;
    pred_src_e  acc_pred_src;
    fetch_src_e acc_src;
    logic [4:0] pred_hist;
    int         mem_reqs;

    fetch_unit #(.FC_BYTES(FCB)) dut (
      .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
      .req_pc(req_pc), .rsp_valid(rsp_valid), .rsp_instr(rsp_instr),
      .mem_req(mem_req), .mem_addr(mem_addr), .mem_valid(mem_valid), .mem_line(mem_line),
      .acc_done(acc_done), .acc_pc(acc_pc), .acc_pred_hit(acc_pred_hit),
      .acc_pred_src(acc_pred_src), .acc_fc_hit(acc_fc_hit), .acc_src(acc_src),
      .pred_hist(pred_hist)
    );

    next_level_memory #(.LATENCY(MEM_LAT)) u_mem (
      .clk(clk), .rst_n(rst_n), .mem_req(mem_req), .mem_addr(mem_addr),
      .mem_valid(mem_valid), .mem_line(mem_line), .req_count(mem_reqs)
    );

    bit    m_v [LINES];
    addr_t m_l [LINES];

    task automatic chk(bit ok, string what);
      checks[g]++;
      if (!ok) begin
        fails[g]++;
        if (fails[g] < 10) $display("FAIL [%0d B] %s at %t", FCB, what, $time);
      end
    endtask

    initial begin
      req_valid = 1'b0; req_pc = '0;
      checks[g] = 0; fails[g] = 0; n_acc[g] = 0; n_ok[g] = 0;
      n_fc_served[g] = 0; n_fc_miss[g] = 0; done[g] = 1'b0;
      for (int i = 0; i < LINES; i++) m_v[i] = 1'b0;
      wait (stream_ready && rst_n);
      @(negedge clk);
      for (int k = 0; k < n_stream; k++) begin
        addr_t pc;
        int    lat, exp_lat, idx;
        bit    p, f, exp_f;
        fetch_src_e s;
        pc = stream[k];
        idx = int'(pc[OFFSET_W +: $clog2(LINES)]);
        exp_f = m_v[idx] && m_l[idx] == (pc >> OFFSET_W);
        req_valid = 1'b1;
        req_pc    = pc;
        lat = 0;
        p = 1'b0; f = 1'b0; s = FROM_FC;
        @(posedge clk);
        do begin
          if (acc_done) begin
            p = acc_pred_hit; f = acc_fc_hit; s = acc_src;
            chk(acc_pc == pc, "acc_pc");
          end
          @(negedge clk);
          req_valid = 1'b0;
          lat++;
          if (!rsp_valid) @(posedge clk);
        end while (!rsp_valid && lat < 200);
        chk(rsp_instr == mem_word(pc), "instruction");
        chk(f == exp_f, "filter cache outcome");
        chk((s == FROM_FC) == (p && f), "answering level");
        exp_lat = (s == FROM_FC) ? 1 : ((p ? 1 + L1C : L1C) + ((s == FROM_MEM) ? 1 + MEM_LAT : 0));
        chk(lat == exp_lat, "latency");
        n_acc[g]++;
        if (p == f) n_ok[g]++;
        if (s == FROM_FC) n_fc_served[g]++;
        if (!f) n_fc_miss[g]++;
        if (s != FROM_FC) begin
          m_v[idx] = 1'b1;
          m_l[idx] = pc >> OFFSET_W;
        end
      end
      done[g] = 1'b1;
    end
  end

  // ---------------- stream generation ----------------
  task automatic emit_run(addr_t pc, int n);
    for (int k = 0; k < n && n_stream < MAXN; k++) begin
      stream[n_stream] = pc + addr_t'(4 * k);
      n_stream++;
    end
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             fails[0] + fails[1] + fails[2] + 1);
    $finish;
  end

  initial begin
    int tot_checks, tot_fails;
    rst_n = 1'b0;
    n_stream = 0;
    for (int it = 0; it < 40; it++) begin
      emit_run(32'h0000_1000, 24);                       // 96 B loop
      for (int j = 0; j < 20; j++) emit_run(32'h0000_2000, 96);   // 384 B loop
      for (int j = 0; j < 10; j++) emit_run(32'h0000_3000, 180);  // 720 B loop
      for (int j = 0; j < 10; j++) begin                 // call into a conflicting routine
        emit_run(32'h0000_4000, 40);
        emit_run(32'h0000_4300, 30);
        emit_run(32'h0000_40a0, 20);
      end
      for (int j = 0; j < 6; j++) emit_run(32'h0000_5000, 225);   // 900 B loop
      for (int j = 0; j < 30; j++)                       // short random branches
        emit_run(32'h0000_6000 + addr_t'(4 * $urandom_range(0, 255)), $urandom_range(2, 12));
    end
    stream_ready = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    tot_checks = 0; tot_fails = 0;
    for (int g = 0; g < NCFG; g++) begin
      $display("filter cache %4d B: fetches=%0d prediction accuracy=%0d.%02d%% served by filter cache=%0d.%02d%% filter-cache misses=%0d",
               256 << g, n_acc[g], longint'(n_ok[g]) * 100 / n_acc[g], (longint'(n_ok[g]) * 10000 / n_acc[g]) % 100,
               longint'(n_fc_served[g]) * 100 / n_acc[g], (longint'(n_fc_served[g]) * 10000 / n_acc[g]) % 100, n_fc_miss[g]);
      tot_checks += checks[g];
      tot_fails  += fails[g];
    end
    tot_checks++;
    if (!(n_fc_miss[2] <= n_fc_miss[1] && n_fc_miss[1] <= n_fc_miss[0])) begin
      tot_fails++;
      $display("FAIL larger filter cache has more misses");
    end
    tot_checks++;
    if (n_acc[0] != n_stream || n_acc[1] != n_stream || n_acc[2] != n_stream) begin
      tot_fails++;
      $display("FAIL not every fetch completed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks, tot_fails);
    $finish;
  end
endmodule
