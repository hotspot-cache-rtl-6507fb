// hs_l1_cache: direct-mapped L1 instruction cache with line refill.
//
// SIZE_BYTES / LINE_BYTES lines (16 KB / 32 B = 512 lines by default). A read
// (rd_en, rd_pc) is answered combinationally: rd_hit and the whole line rd_line.
// A read that misses starts a refill: mem_req goes high with the line address
// mem_addr (offset bits zero) and stays high until the next level answers with
// mem_ack and the line on mem_line; the line is written at that edge and the same
// read hits from the next cycle on. busy is high while a refill is outstanding;
// reads during a refill are not looked at. The array is single-ported: one read
// or one refill write per cycle. Reset invalidates all lines. Assertions check
// that a request is held with a stable, line-aligned address until acknowledged.
// Size, line size and direct mapping follow the document; the refill handshake and
// its timing are this design's choice.
module hs_l1_cache
  import hs_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rd_en,
  input  addr_t  rd_pc,
  output logic   rd_hit,
  output line_t  rd_line,
  output logic   busy,
  output logic   mem_req,
  output addr_t  mem_addr,
  input  logic   mem_ack,
  input  line_t  mem_line
);

  localparam int unsigned LINES = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = ADDR_W - OFF_W - IDX_W;

  logic [TAG_W-1:0] tag   [LINES];
  logic             valid [LINES];
  line_t            data  [LINES];

  wire [IDX_W-1:0] rd_idx = rd_pc[OFF_W +: IDX_W];
  wire [TAG_W-1:0] rd_tag = rd_pc[ADDR_W-1 -: TAG_W];
  wire [IDX_W-1:0] mm_idx = mem_addr[OFF_W +: IDX_W];
  wire [TAG_W-1:0] mm_tag = mem_addr[ADDR_W-1 -: TAG_W];

  assign rd_hit  = !mem_req && valid[rd_idx] && (tag[rd_idx] == rd_tag);
  assign rd_line = data[rd_idx];
  assign busy    = mem_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_req  <= 1'b0;
      mem_addr <= '0;
      for (int i = 0; i < LINES; i++) begin
        valid[i] <= 1'b0;
        tag[i]   <= '0;
      end
    end else if (mem_req) begin
      if (mem_ack) begin
        mem_req        <= 1'b0;
        valid[mm_idx]  <= 1'b1;
        tag[mm_idx]    <= mm_tag;
      end
    end else if (rd_en && !rd_hit) begin
      mem_req  <= 1'b1;
      mem_addr <= {rd_pc[ADDR_W-1:OFF_W], OFF_W'(0)};
    end
  end

  always_ff @(posedge clk) begin
    if (mem_req && mem_ack) data[mm_idx] <= mem_line;
  end

  // Refill handshake: a request stays up, with a stable line address, until acked.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req && !mem_ack |=> mem_req && $stable(mem_addr));
  a_addr_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req |-> mem_addr[OFF_W-1:0] == '0);

endmodule
