// hs_pkg: types and constants shared by the HotSpot instruction-cache front end.
//
// The front end fetches 32-bit instructions from 32-bit byte addresses. Caches move
// whole 32-byte lines (eight instructions), the line size of both the L0 and the L1
// cache. The fetch mode says which memory serves the current basic block: the small
// L0 cache, the L1 cache (through its line buffer), or the L1 cache with a copy of
// each line into the L0 cache (promoting). The stage says whether the front end is
// profiling branches to find hot basic blocks or monitoring the share of hot branches
// to detect a phase change. Address and instruction widths are this design's choice
// for an ARM-like core; the line size, the modes and the stages follow the document.
package hs_pkg;

  localparam int unsigned ADDR_W     = 32;   // byte address width
  localparam int unsigned INSTR_W    = 32;   // instruction width
  localparam int unsigned LINE_BYTES = 32;   // L0 and L1 line size
  localparam int unsigned LINE_WORDS = LINE_BYTES / (INSTR_W / 8);
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);   // byte offset in a line
  localparam int unsigned WOFF_W     = $clog2(LINE_WORDS);   // word index in a line

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [LINE_W-1:0]  line_t;

  // Fetch modes of the mode controller.
  typedef enum logic [1:0] {
    MODE_L1      = 2'd0,   // fetch from the L1 cache (line buffer first)
    MODE_L0      = 2'd1,   // fetch from the L0 cache
    MODE_PROMOTE = 2'd2    // fetch from the L1 cache and copy the line into the L0 cache
  } fetch_mode_e;

  // Stages of the run-time L0 management.
  typedef enum logic {
    STAGE_PROFILE = 1'b0,  // count branch executions, promote hot basic blocks
    STAGE_MONITOR = 1'b1   // watch the hot-branch share for a phase change
  } stage_e;

  // Which memory delivered a fetched instruction.
  typedef enum logic [1:0] {
    SRC_NONE = 2'd0,
    SRC_L0   = 2'd1,
    SRC_LB   = 2'd2,       // L1 line buffer: no L1 array access
    SRC_L1   = 2'd3
  } fetch_src_e;

  // Instruction word at index w of a line.
  function automatic instr_t line_word(line_t line, logic [WOFF_W-1:0] w);
    return line[w*INSTR_W +: INSTR_W];
  endfunction

endpackage
