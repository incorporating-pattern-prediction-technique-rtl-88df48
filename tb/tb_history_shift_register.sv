// tb_history_shift_register: self-checking test of the global history
// register. Random shift enables and outcomes are applied for many cycles;
// a reference history kept in the testbench (shift left, newest bit at 0)
// is compared with both hist and hist_next every cycle. Reset to zero is
// checked first.
module tb_history_shift_register;
  localparam int unsigned HB = 5;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          shift_en, shift_in;
  logic [HB-1:0] hist, hist_next;
  logic [HB-1:0] model;
  int checks = 0, failures = 0;

  history_shift_register #(.HIST_BITS(HB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: hist=%b hist_next=%b model=%b", what, hist, hist_next, model);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; shift_en = 1'b0; shift_in = 1'b0;
    model = '0;
    repeat (2) @(posedge clk);
    #1 check(hist == '0, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      shift_en = ($urandom_range(0, 3) != 0);
      shift_in = $urandom_range(0, 1) == 1;
      #1;
      check(hist_next == (shift_en ? {model[HB-2:0], shift_in} : model), "hist_next");
      @(posedge clk);
      if (shift_en) model = {model[HB-2:0], shift_in};
      #1 check(hist == model, "hist");
    end
    // After HB shifts of ones the register is all ones, oldest bit first out.
    @(negedge clk); shift_en = 1'b1; shift_in = 1'b1;
    repeat (HB) @(posedge clk);
    #1 check(hist == '1, "all ones after HB shifts");
    @(negedge clk); shift_in = 1'b0;
    @(posedge clk); #1 check(hist == {{(HB-1){1'b1}}, 1'b0}, "newest in bit 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
