// Testbench for hs_btb at its default size (64 sets x 4 ways, threshold 64).
// Directed checks: allocation of resolved taken branches and their targets; an
// entry becomes hot on exactly its 64th counted hit while profiling (lk_reach in
// that cycle only); nothing is counted in monitoring or without lk_en; toggling
// hot_sel turns hot flags into prev-hot flags; clr_prev and clr_cnt act on every
// entry; a hot entry survives allocations into its full set while non-hot entries
// are replaced; a not-taken resolution allocates nothing; target refresh.
module hs_btb_tb;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  addr_t lk_pc, lk_target, rs_pc, rs_target;
  logic lk_en, lk_hit, lk_hot, lk_prev, lk_reach;
  logic profiling, hot_sel, clr_prev, clr_cnt, rs_valid, rs_taken;
  int checks = 0, failures = 0;

  hs_btb dut (.clk, .rst_n, .lk_pc, .lk_en, .lk_hit, .lk_target, .lk_hot, .lk_prev,
              .lk_reach, .profiling, .hot_sel, .clr_prev, .clr_cnt, .rs_valid, .rs_pc,
              .rs_taken, .rs_target);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic resolve(addr_t pc, logic taken, addr_t tgt);
    @(negedge clk);
    rs_valid = 1; rs_pc = pc; rs_taken = taken; rs_target = tgt;
    @(posedge clk); #1 rs_valid = 0;
  endtask

  // look pc up; returns hit/hot/prev/reach seen before the clock edge
  task automatic look(addr_t pc, logic en, output logic h, output logic hot,
                      output logic prev, output logic reach, output addr_t tgt);
    @(negedge clk);
    lk_pc = pc; lk_en = en;
    #1;
    h = lk_hit; hot = lk_hot; prev = lk_prev; reach = lk_reach; tgt = lk_target;
    @(posedge clk); #1 lk_en = 0;
  endtask

  task automatic pulse_clr(logic p, logic c);
    @(negedge clk);
    clr_prev = p; clr_cnt = c;
    @(posedge clk); #1 clr_prev = 0; clr_cnt = 0;
  endtask

  logic h, hot, prev, reach;
  addr_t tgt;
  addr_t A = 32'h0040_1010, B = 32'h0040_2010, C = 32'h0040_3014;

  initial begin
    lk_pc = '0; lk_en = 0; profiling = 1; hot_sel = 0; clr_prev = 0; clr_cnt = 0;
    rs_valid = 0; rs_pc = '0; rs_taken = 0; rs_target = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    look(A, 1, h, hot, prev, reach, tgt);
    check(!h, "empty BTB misses");
    resolve(A, 0, 32'h0040_0000);
    look(A, 1, h, hot, prev, reach, tgt);
    check(!h, "not-taken branch not allocated");
    resolve(A, 1, 32'h0040_0800);
    look(A, 0, h, hot, prev, reach, tgt);
    check(h && !hot && !prev && tgt == 32'h0040_0800, "allocated with target");
    // count to the threshold: this was an uncounted lookup (lk_en = 0)
    for (int i = 1; i <= 64; i++) begin
      look(A, 1, h, hot, prev, reach, tgt);
      check(h && !hot && (reach == (i == 64)), $sformatf("count %0d reach=%0b", i, reach));
    end
    look(A, 1, h, hot, prev, reach, tgt);
    check(h && hot && !prev && !reach, "hot after 64 hits");
    // monitoring: no counting
    resolve(B, 1, 32'h0040_0900);
    profiling = 0;
    for (int i = 0; i < 70; i++) look(B, 1, h, hot, prev, reach, tgt);
    check(h && !hot && !reach, "no promotion while monitoring");
    profiling = 1;
    for (int i = 1; i <= 63; i++) look(B, 1, h, hot, prev, reach, tgt);
    check(!hot, "B counted from zero in profiling");
    // clr_cnt clears B's counter: needs 64 more
    pulse_clr(0, 1);
    for (int i = 1; i <= 64; i++) begin
      look(B, 1, h, hot, prev, reach, tgt);
      check(reach == (i == 64), $sformatf("B after clr_cnt %0d", i));
    end
    look(B, 0, h, hot, prev, reach, tgt);
    check(hot, "B hot");
    // bank swap: hot becomes prev-hot
    hot_sel = 1;
    look(A, 0, h, hot, prev, reach, tgt);
    check(h && !hot && prev, "A is prev-hot after swap");
    // promote C in the new bank
    resolve(C, 1, 32'h0040_0a00);
    for (int i = 1; i <= 64; i++) look(C, 1, h, hot, prev, reach, tgt);
    look(C, 0, h, hot, prev, reach, tgt);
    check(hot && !prev, "C hot in bank 1");
    // clear the prev-hot bank (bank 0)
    pulse_clr(1, 0);
    look(A, 0, h, hot, prev, reach, tgt);
    check(h && !hot && !prev, "A prev-hot cleared");
    look(C, 0, h, hot, prev, reach, tgt);
    check(hot, "C keeps hot flag");
    // replacement: set of C (index 5) gets 3 more non-hot branches, then 4 more
    for (int k = 1; k <= 3; k++) resolve(C + k * 256, 1, 32'h100 * k);
    for (int k = 1; k <= 3; k++) begin
      look(C + k * 256, 0, h, hot, prev, reach, tgt);
      check(h && tgt == 32'h100 * k, "set filled");
    end
    for (int k = 4; k <= 7; k++) resolve(C + k * 256, 1, 32'h100 * k);
    look(C, 0, h, hot, prev, reach, tgt);
    check(h && hot, "hot branch survives replacement");
    begin
      int present = 0;
      for (int k = 1; k <= 7; k++) begin
        look(C + k * 256, 0, h, hot, prev, reach, tgt);
        if (h) present++;
      end
      check(present == 3, $sformatf("3 non-hot ways in use (%0d)", present));
      look(C + 7 * 256, 0, h, hot, prev, reach, tgt);
      check(h, "latest allocation present");
    end
    // target refresh
    resolve(A, 1, 32'h0040_0c00);
    look(A, 0, h, hot, prev, reach, tgt);
    check(h && tgt == 32'h0040_0c00, "target refreshed");
    // random allocations: a branch just allocated always hits with its target
    repeat (2000) begin
      automatic addr_t p = addr_t'(32'h0050_0000 + ($urandom % 4096) * 4);
      automatic addr_t t = addr_t'($urandom & 32'hffff_fffc);
      resolve(p, 1, t);
      look(p, 0, h, hot, prev, reach, tgt);
      check(h && tgt == t, "fresh entry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
