// Testbench for hs_line_buffer: after reset nothing hits; after a load, every word
// of that line hits with the right instruction in the same cycle and every other
// line misses; random loads and reads are compared with a one-entry reference.
module hs_line_buffer_tb;
  import hs_pkg::*;
  import hs_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  addr_t rd_pc, ld_pc;
  logic rd_hit, ld_en;
  instr_t rd_instr;
  line_t rd_line, ld_line;
  int checks = 0, failures = 0;
  bit ref_v;
  addr_t ref_ln;

  hs_line_buffer dut (.clk, .rst_n, .rd_pc, .rd_hit, .rd_instr, .rd_line, .ld_en, .ld_pc, .ld_line);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // eight lines: four neighbours in each of two 64 KB regions, so that line
  // addresses differ in low and in high bits
  function automatic addr_t rnd_addr();
    int ln = $urandom % 8;
    return addr_t'(32'h2000 + (ln % 4) * 32 + (ln / 4) * 32'h1_0000 + ($urandom % 8) * 4);
  endfunction

  initial begin
    ld_en = 0; rd_pc = 32'h1000; ld_pc = '0; ld_line = '0; ref_v = 0; ref_ln = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1; checks++; if (rd_hit) failures++;
    repeat (20000) begin
      @(negedge clk);
      rd_pc   = rnd_addr();
      ld_en   = ($urandom % 5) == 0;
      ld_pc   = rnd_addr();
      ld_line = line_of(ld_pc);
      #1;
      begin
        automatic bit exp_hit = ref_v && ref_ln == {rd_pc[31:5], 5'b0};
        checks++;
        if (rd_hit != exp_hit || (exp_hit && (rd_instr != instr_of(rd_pc) ||
                                              rd_line != line_of(rd_pc)))) begin
          failures++;
          $display("FAIL pc=%h hit=%0b exp=%0b", rd_pc, rd_hit, exp_hit);
        end
      end
      @(posedge clk);
      if (ld_en) begin ref_v = 1; ref_ln = {ld_pc[31:5], 5'b0}; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
