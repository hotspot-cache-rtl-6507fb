// Testbench for hs_l1_cache with the behavioural next-level memory. Each read is
// held until it hits. Checks: a cold read misses, raises mem_req one cycle later
// with the line address, and hits in the cycle after mem_ack, LATENCY + 2 cycles
// after the missing read with this memory; hits return the right line; lines that
// map to the same slot evict each other (direct mapping); the memory is asked
// exactly once per reference miss.
module hs_l1_cache_tb;
  import hs_pkg::*;
  import hs_tb_pkg::*;
  localparam int LAT = 4;
  logic clk = 0, rst_n = 0;
  logic rd_en, rd_hit, busy, mem_req, mem_ack;
  addr_t rd_pc, mem_addr;
  line_t rd_line, mem_line;
  int served;
  int checks = 0, failures = 0;
  int ref_misses = 0;
  addr_t ref_ln [512];
  bit    ref_v  [512];

  hs_l1_cache dut (.clk, .rst_n, .rd_en, .rd_pc, .rd_hit, .rd_line, .busy,
                   .mem_req, .mem_addr, .mem_ack, .mem_line);
  hs_mem_model #(.LATENCY(LAT)) mem (.clk, .rst_n, .req(mem_req), .addr(mem_addr),
                                     .ack(mem_ack), .line(mem_line), .served);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read(addr_t a);
    int s = int'(a[13:5]);
    bit exp_hit = ref_v[s] && ref_ln[s] == {a[31:5], 5'b0};
    int cycles = 0;
    @(negedge clk);
    rd_en = 1; rd_pc = a;
    #1;
    checks++;
    if (rd_hit != exp_hit) begin failures++; $display("FAIL hit %h", a); end
    if (!exp_hit) begin
      ref_misses++;
      @(posedge clk); #1;
      checks++;
      if (!mem_req || mem_addr != {a[31:5], 5'b0}) begin failures++; $display("FAIL req %h", a); end
      while (!rd_hit && cycles < 100) begin @(negedge clk); #1; cycles++; end
      checks++;
      if (cycles != LAT + 2) begin failures++; $display("FAIL miss cycles %0d", cycles); end
      ref_v[s] = 1; ref_ln[s] = {a[31:5], 5'b0};
    end
    checks++;
    if (!rd_hit || rd_line != line_of(a)) begin failures++; $display("FAIL data %h", a); end
    @(posedge clk);
    #1 rd_en = 0;
  endtask

  initial begin
    rd_en = 0; rd_pc = '0;
    foreach (ref_v[i]) ref_v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    read(32'h0001_0040);
    read(32'h0001_0044);          // same line: hit
    read(32'h0001_4040);          // same slot, other tag: evicts
    read(32'h0001_0040);          // misses again
    repeat (6000) read(addr_t'(32'h0010_0000 + ($urandom % 12288) * 4));
    checks++;
    if (served != ref_misses) begin failures++; $display("FAIL served %0d vs %0d", served, ref_misses); end
    $display("misses=%0d", ref_misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
