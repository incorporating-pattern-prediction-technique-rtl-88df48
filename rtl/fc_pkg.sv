// fc_pkg: types and constants shared by the pattern-predicted filter-cache
// fetch path.
//
// Addresses and instructions are 32 bits wide (a 32-bit ARM-style fetch
// stream, byte addressed, one instruction every 4 bytes). Cache lines are
// 32 bytes, the line size of the L1 cache; the filter cache uses the same
// line size so that one L1 line moves into the filter cache in one transfer.
// The 32-bit widths and the shared line size are choices of this design.
package fc_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned INSTR_W    = 32;
  localparam int unsigned LINE_BYTES = 32;
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned OFFSET_W   = $clog2(LINE_BYTES);

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [LINE_W-1:0]  line_t;

  // Where the prediction for an access came from.
  typedef enum logic {
    SRC_SAME_LINE = 1'b0,  // pc and pc+4 fall in the same line: hit assumed
    SRC_PHT       = 1'b1   // line change: pattern history table consulted
  } pred_src_e;

  // Which level delivered the instruction of a completed access.
  typedef enum logic [1:0] {
    FROM_FC  = 2'd0,  // filter cache, after a correct hit prediction
    FROM_L1  = 2'd1,  // L1 cache (predicted miss, or hit mispredicted)
    FROM_MEM = 2'd2   // next memory level, after an L1 miss
  } fetch_src_e;

  // Select the 32-bit instruction at byte address a from a cache line.
  function automatic instr_t line_word(line_t l, addr_t a);
    return l[a[OFFSET_W-1:2]*INSTR_W +: INSTR_W];
  endfunction

endpackage
