// tb_pattern_history_table: self-checking test of the pattern history table.
// A reference array of saturating counters in the testbench is updated with
// the same random index/outcome stream; every cycle the read counter, the
// threshold decision (strictly above 2 predicts a hit) and the same-cycle
// read-after-update bypass are compared. Reset value and saturation at both
// ends are checked directly.
module tb_pattern_history_table;
  localparam int unsigned HB = 5;
  localparam int unsigned N  = 2 ** HB;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [HB-1:0] rd_idx, upd_idx;
  logic [1:0]    rd_cnt;
  logic          rd_pred_hit, upd_en, upd_hit;
  int            model [N];
  int            exp_cnt;
  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0, bypass = 0;

  pattern_history_table #(.HIST_BITS(HB), .CNT_BITS(2), .THRESHOLD(2), .CNT_INIT(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: idx=%0d cnt=%0d pred=%0b exp=%0d", what, rd_idx, rd_cnt, rd_pred_hit, exp_cnt);
    end
  endtask

  function automatic int step(int c, bit h);
    if (h) return (c == 3) ? 3 : c + 1;
    else   return (c == 0) ? 0 : c - 1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; upd_en = 1'b0; upd_idx = '0; upd_hit = 1'b0; rd_idx = '0;
    for (int i = 0; i < N; i++) model[i] = 2;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); rd_idx = HB'(i); exp_cnt = 2;
      #1 check(rd_cnt == 2 && !rd_pred_hit, "reset value");
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      upd_en  = ($urandom_range(0, 1) == 1);
      upd_idx = HB'($urandom_range(0, 7));     // few entries: reach saturation
      upd_hit = ($urandom_range(0, 2) != 0);
      rd_idx  = ($urandom_range(0, 1) == 1) ? upd_idx : HB'($urandom_range(0, N - 1));
      exp_cnt = (upd_en && upd_idx == rd_idx) ? step(model[rd_idx], upd_hit) : model[rd_idx];
      if (upd_en && upd_idx == rd_idx) bypass++;
      #1;
      check(int'(rd_cnt) == exp_cnt, "counter");
      check(rd_pred_hit == (exp_cnt > 2), "prediction");
      @(posedge clk);
      if (upd_en) begin
        if (upd_hit && model[upd_idx] == 3) sat_hi++;
        if (!upd_hit && model[upd_idx] == 0) sat_lo++;
        model[upd_idx] = step(model[upd_idx], upd_hit);
      end
    end
    check(sat_hi > 0 && sat_lo > 0 && bypass > 0, "saturation and bypass exercised");
    $display("saturate-high=%0d saturate-low=%0d bypass=%0d", sat_hi, sat_lo, bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
