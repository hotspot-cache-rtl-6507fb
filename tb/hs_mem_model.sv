// hs_mem_model: behavioural model of the next memory level (the backing store
// behind the L1 instruction cache). A request (req held high with a line address)
// is answered LATENCY cycles later by a one-cycle ack with the line's contents,
// computed from the address by hs_tb_pkg::line_of. It counts the requests it served.
module hs_mem_model
  import hs_pkg::*;
#(
  parameter int unsigned LATENCY = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req,
  input  addr_t addr,
  output logic  ack,
  output line_t line,
  output int    served
);
  int wait_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack      <= 1'b0;
      line     <= '0;
      wait_cnt <= 0;
      served   <= 0;
    end else begin
      ack <= 1'b0;
      if (req && !ack) begin
        if (wait_cnt + 1 >= int'(LATENCY)) begin
          ack      <= 1'b1;
          line     <= hs_tb_pkg::line_of(addr);
          wait_cnt <= 0;
          served   <= served + 1;
        end else begin
          wait_cnt <= wait_cnt + 1;
        end
      end
    end
  end
endmodule
