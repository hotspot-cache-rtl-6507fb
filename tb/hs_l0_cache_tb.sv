// Testbench for hs_l0_cache: random line writes and reads over a small address
// range that forces conflicts, checked against a reference that remembers the last
// line written to each of the 16 slots. Reads must be combinational (valid in the
// cycle the address is applied) and no read may ever fill a line.
module hs_l0_cache_tb;
  import hs_pkg::*;
  import hs_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  addr_t rd_pc, wr_pc;
  logic rd_hit, wr_en;
  instr_t rd_instr;
  line_t wr_line;
  int checks = 0, failures = 0;
  int hits = 0, misses = 0;
  addr_t ref_ln [16];   // line address held by each slot
  bit    ref_v  [16];

  hs_l0_cache dut (.clk, .rst_n, .rd_pc, .rd_hit, .rd_instr, .wr_en, .wr_pc, .wr_line);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t rnd_addr();
    // 64 lines of code: 4 candidates per slot
    return addr_t'(32'h0040_0000 + ($urandom % 2048) * 4);
  endfunction

  initial begin
    wr_en = 0; rd_pc = '0; wr_pc = '0; wr_line = '0;
    foreach (ref_v[i]) ref_v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20000) begin
      @(negedge clk);
      rd_pc = rnd_addr();
      wr_en = ($urandom % 4) == 0;
      wr_pc = rnd_addr();
      wr_line = line_of(wr_pc);
      #1;
      begin
        automatic int s = int'(rd_pc[8:5]);
        automatic bit exp_hit = ref_v[s] && ref_ln[s] == {rd_pc[31:5], 5'b0};
        checks++;
        if (rd_hit != exp_hit || (exp_hit && rd_instr != instr_of(rd_pc))) begin
          failures++;
          $display("FAIL pc=%h hit=%0b exp=%0b", rd_pc, rd_hit, exp_hit);
        end
        if (exp_hit) hits++; else misses++;
      end
      @(posedge clk);
      if (wr_en) begin
        ref_v[int'(wr_pc[8:5])]  = 1;
        ref_ln[int'(wr_pc[8:5])] = {wr_pc[31:5], 5'b0};
      end
    end
    checks++;
    if (hits < 100 || misses < 100) failures++;
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
