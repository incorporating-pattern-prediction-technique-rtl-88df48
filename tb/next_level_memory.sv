// next_level_memory: behavioural model of the memory level behind the L1
// instruction cache, for simulation only (not synthesizable design).
//
// It answers a line request: while mem_req is high it counts LATENCY clock
// edges, then raises mem_valid for one cycle with the whole line. The
// contents are not stored: word at byte address a is mem_word(a), a fixed
// hash of the address, so a testbench can compute what any fetch must
// return. LATENCY must be at least 1. req_count counts answered requests.
module next_level_memory
  import fc_pkg::*;
#(
  parameter int unsigned LATENCY = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mem_req,
  input  addr_t mem_addr,
  output logic  mem_valid,
  output line_t mem_line,
  output int    req_count
);

  int cnt;

  function automatic instr_t mem_word(addr_t a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  always_comb begin
    for (int w = 0; w < LINE_BYTES / 4; w++)
      mem_line[w*INSTR_W +: INSTR_W] = mem_word({mem_addr[ADDR_W-1:OFFSET_W], OFFSET_W'(0)} + addr_t'(4 * w));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_valid <= 1'b0;
      cnt       <= 0;
      req_count <= 0;
    end else begin
      mem_valid <= 1'b0;
      if (mem_req && !mem_valid) begin
        if (cnt == int'(LATENCY) - 1) begin
          mem_valid <= 1'b1;
          cnt       <= 0;
          req_count <= req_count + 1;
        end else begin
          cnt <= cnt + 1;
        end
      end
    end
  end

endmodule
