// l1_icache: the main (L1) instruction cache behind the filter cache.
//
// SIZE_BYTES of storage in lines of fc_pkg::LINE_BYTES, WAYS-way set
// associative. The defaults are the evaluated L1: 8 KB, 32 B lines, 32 ways,
// which gives 8 sets of 32 ways. A lookup compares the tag against all ways
// of the selected set in parallel and returns the whole line, because on the
// fetch path a hit line is transferred to the filter cache in one go.
// Replacement is round robin per set (a pointer per set that advances on
// each fill); the replacement policy is a choice of this design.
//
// Interface:
//   rd_addr -> hit, rd_line   combinational lookup; rd_line is valid when hit.
//   fill_en, fill_addr,       at the rising edge, write a line returned by
//   fill_line                 the next memory level into the way the set's
//                             round-robin pointer selects.
// Reset clears valid bits and pointers.
module l1_icache
  import fc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned WAYS       = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t rd_addr,
  output logic  hit,
  output line_t rd_line,
  input  logic  fill_en,
  input  addr_t fill_addr,
  input  line_t fill_line
);

  localparam int unsigned SETS  = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned IDX_W = (SETS > 1) ? SET_W : 0;
  localparam int unsigned TAG_W = ADDR_W - OFF_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [SET_W-1:0] set_t;
  typedef logic [WAY_W-1:0] way_t;

  logic [WAYS-1:0] valid_q [SETS];
  tag_t            tag_q   [SETS][WAYS];
  line_t           data_q  [SETS][WAYS];
  way_t            rr_q    [SETS];

  set_t rd_set, fill_set;
  tag_t rd_tag, fill_tag;

  function automatic set_t set_of(addr_t a);
    if (SETS > 1) return set_t'(a >> OFF_W);
    else          return '0;
  endfunction

  assign rd_set   = set_of(rd_addr);
  assign fill_set = set_of(fill_addr);
  assign rd_tag   = rd_addr[ADDR_W-1 -: TAG_W];
  assign fill_tag = fill_addr[ADDR_W-1 -: TAG_W];

  // Parallel tag compare over the ways of the selected set.
  always_comb begin
    hit     = 1'b0;
    rd_line = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[rd_set][w] && tag_q[rd_set][w] == rd_tag) begin
        hit     = 1'b1;
        rd_line = data_q[rd_set][w];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        rr_q[s]    <= '0;
      end
    end else if (fill_en) begin
      valid_q[fill_set][rr_q[fill_set]] <= 1'b1;
      rr_q[fill_set] <= (int'(rr_q[fill_set]) == WAYS - 1) ? '0 : rr_q[fill_set] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (fill_en) begin
      tag_q[fill_set][rr_q[fill_set]]  <= fill_tag;
      data_q[fill_set][rr_q[fill_set]] <= fill_line;
    end
  end

endmodule
