// hs_l0_cache: the small direct-mapped L0 instruction cache.
//
// SIZE_BYTES / LINE_BYTES lines (512 B / 32 B = 16 lines by default), one tag and
// valid bit per line. Reading is combinational: rd_pc selects a line and a word,
// rd_hit says whether the line holds rd_pc, rd_instr is the word. Writing is a whole
// line at a clock edge (wr_en, wr_pc, wr_line), which replaces whatever the slot
// held. The cache never fills itself on a miss: lines arrive only through the write
// port, which the front end drives in promoting mode, so a promoted line that a
// later promotion displaced stays out of the L0 cache. Reset invalidates all lines.
// Size, line size and direct mapping follow the document; the port shape is this
// design's choice.
module hs_l0_cache
  import hs_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 512
) (
  input  logic   clk,
  input  logic   rst_n,
  input  addr_t  rd_pc,
  output logic   rd_hit,
  output instr_t rd_instr,
  input  logic   wr_en,
  input  addr_t  wr_pc,
  input  line_t  wr_line
);

  localparam int unsigned LINES = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = ADDR_W - OFF_W - IDX_W;

  logic [TAG_W-1:0] tag   [LINES];
  logic             valid [LINES];
  line_t            data  [LINES];

  wire [IDX_W-1:0]  rd_idx = rd_pc[OFF_W +: IDX_W];
  wire [TAG_W-1:0]  rd_tag = rd_pc[ADDR_W-1 -: TAG_W];
  wire [IDX_W-1:0]  wr_idx = wr_pc[OFF_W +: IDX_W];
  wire [TAG_W-1:0]  wr_tag = wr_pc[ADDR_W-1 -: TAG_W];

  assign rd_hit   = valid[rd_idx] && (tag[rd_idx] == rd_tag);
  assign rd_instr = line_word(data[rd_idx], rd_pc[2 +: WOFF_W]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) begin
        valid[i] <= 1'b0;
        tag[i]   <= '0;
      end
    end else if (wr_en) begin
      valid[wr_idx] <= 1'b1;
      tag[wr_idx]   <= wr_tag;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) data[wr_idx] <= wr_line;
  end

endmodule
