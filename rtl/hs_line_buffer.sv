// hs_line_buffer: one-entry line buffer in front of the L1 instruction cache.
//
// Holds the last line read from the L1 cache together with its line address. A
// fetch whose line address matches (rd_hit) takes its instruction from the buffer
// and the L1 arrays are not read, which saves energy for sequential code that is
// not in the L0 cache. The lookup is combinational and done in parallel with the
// L1 access, so a buffer hit costs no extra cycle. ld_en loads a line at a clock
// edge; reset empties the buffer. The single entry and its purpose follow the
// document; the ports are this design's choice.
module hs_line_buffer
  import hs_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  addr_t  rd_pc,
  output logic   rd_hit,
  output instr_t rd_instr,
  output line_t  rd_line,
  input  logic   ld_en,
  input  addr_t  ld_pc,
  input  line_t  ld_line
);

  logic                     valid;
  logic [ADDR_W-OFF_W-1:0]  lnaddr;
  line_t                    data;

  assign rd_hit   = valid && (lnaddr == rd_pc[ADDR_W-1:OFF_W]);
  assign rd_line  = data;
  assign rd_instr = line_word(data, rd_pc[2 +: WOFF_W]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      lnaddr <= '0;
      data   <= '0;
    end else if (ld_en) begin
      valid  <= 1'b1;
      lnaddr <= ld_pc[ADDR_W-1:OFF_W];
      data   <= ld_line;
    end
  end

endmodule
