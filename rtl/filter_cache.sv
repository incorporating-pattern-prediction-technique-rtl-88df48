// filter_cache: the small instruction cache placed above the L1 cache.
//
// Direct mapped, SIZE_BYTES of instruction storage in lines of fc_pkg::LINE_BYTES
// (default 512 B = 16 lines of 32 B). The 512 B default is the size named as
// typical for a filter cache; 256 B and 1024 B are the other evaluated
// sizes. The organisation (direct mapped, 32 B lines equal to the L1 line,
// whole-line fill) is a choice of this design, as only the capacity is given.
//
// Interface:
//   rd_addr -> hit, rd_word   combinational lookup of a fetch address: hit
//                             says whether its line is present, rd_word is
//                             the 32-bit instruction (valid when hit).
//   fill_en, fill_addr,       at the rising edge, write a whole line that was
//   fill_line                 transferred from the L1 cache, replacing
//                             whatever line held that index.
// Reset clears the valid bits only; tags and data are don't-care until
// filled.
module filter_cache
  import fc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 512
) (
  input  logic   clk,
  input  logic   rst_n,
  input  addr_t  rd_addr,
  output logic   hit,
  output instr_t rd_word,
  input  logic   fill_en,
  input  addr_t  fill_addr,
  input  line_t  fill_line
);

  localparam int unsigned LINES = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W = (LINES > 1) ? $clog2(LINES) : 1;
  localparam int unsigned TAG_W = ADDR_W - OFF_W - IDX_W;

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [IDX_W-1:0] idx_t;

  logic [LINES-1:0] valid_q;
  tag_t             tag_q  [LINES];
  line_t            data_q [LINES];

  idx_t rd_idx, fill_idx;
  tag_t rd_tag, fill_tag;

  assign rd_idx   = rd_addr[OFF_W +: IDX_W];
  assign rd_tag   = rd_addr[ADDR_W-1 -: TAG_W];
  assign fill_idx = fill_addr[OFF_W +: IDX_W];
  assign fill_tag = fill_addr[ADDR_W-1 -: TAG_W];

  assign hit     = valid_q[rd_idx] && (tag_q[rd_idx] == rd_tag);
  assign rd_word = line_word(data_q[rd_idx], rd_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       valid_q <= '0;
    else if (fill_en) valid_q[fill_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (fill_en) begin
      tag_q[fill_idx]  <= fill_tag;
      data_q[fill_idx] <= fill_line;
    end
  end

endmodule
