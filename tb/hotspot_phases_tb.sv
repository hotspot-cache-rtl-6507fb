// Phase-tracking workload for hotspot_icache at its default parameters.
//
// A core model runs a program with three distinct phases, each a loop of eight
// basic blocks of 16 instructions (two lines each) in its own code region, like
// a media encoder that moves from one kernel to the next. Each phase's hot code is
// exactly the size of the L0 cache (16 lines), so profiling ends with the whole
// loop promoted.
// Checked: every delivered instruction is correct; each phase is detected (three
// entries into monitoring, two returns to profiling, one per phase change); in the
// steady part of every phase at least 90 % of the fetches come from the L0 cache;
// over the whole run the L0 miss rate stays below 2 % of the fetches. The L0 share
// and miss rate of each phase are printed.
module hotspot_phases_tb;
  import hs_pkg::*;
  import hs_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic if_req, if_ready, if_pred_taken;
  addr_t if_pc, if_pred_target;
  instr_t if_instr;
  fetch_src_e if_src;
  logic rs_valid, rs_taken, rs_mispredict;
  addr_t rs_pc, rs_target;
  logic mem_req, mem_ack;
  addr_t mem_addr;
  line_t mem_line;
  fetch_mode_e mode;
  stage_e stage;
  logic hot_sel;
  logic [7:0] mon_value;
  logic [4:0] promoted_lines;
  logic ev_l0_miss, ev_promote_line, ev_l0_write, ev_enter_monitor, ev_enter_profile;
  int served;

  hotspot_icache dut (
    .clk, .rst_n, .if_req, .if_pc, .if_ready, .if_instr, .if_src, .if_pred_taken,
    .if_pred_target, .rs_valid, .rs_pc, .rs_taken, .rs_target, .rs_mispredict,
    .mem_req, .mem_addr, .mem_ack, .mem_line, .mode, .stage, .hot_sel, .mon_value,
    .promoted_lines, .ev_l0_miss, .ev_promote_line, .ev_l0_write, .ev_enter_monitor,
    .ev_enter_profile
  );

  hs_mem_model #(.LATENCY(4)) mem (.clk, .rst_n, .req(mem_req), .addr(mem_addr),
                                   .ack(mem_ack), .line(mem_line), .served);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  localparam int NPH   = 3;
  localparam int NBLK  = 8;
  localparam int BLEN  = 16;
  localparam int ITERS = 400;
  localparam int WARM  = 150;   // iterations before the steady part of a phase

  function automatic addr_t bstart(int p, int i);
    return addr_t'(32'h0060_0000 + p * 32'h2000 + i * 64);
  endfunction

  int n_mon = 0, n_prof = 0, n_miss = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_enter_monitor) n_mon++;
    if (ev_enter_profile) n_prof++;
    if (ev_l0_miss) n_miss++;
  end

  initial begin
    addr_t pc;
    bit pend_v, pend_mis;
    addr_t pend_pc, pend_tgt;
    int ph, blk, off, iter;
    int f_all, f_steady, l0_steady, l0_all, miss0, total;
    if_req = 0; if_pc = '0;
    rs_valid = 0; rs_pc = '0; rs_taken = 0; rs_target = '0; rs_mispredict = 0;
    pend_v = 0; pend_mis = 0; pend_pc = '0; pend_tgt = '0;
    total = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (ph = 0; ph < NPH; ph++) begin
      f_all = 0; f_steady = 0; l0_steady = 0; l0_all = 0; miss0 = n_miss;
      blk = 0; off = 0; iter = 0;
      pc = bstart(ph, 0);
      while (iter < ITERS) begin
        @(negedge clk);
        rs_valid = pend_v; rs_pc = pend_pc; rs_taken = 1; rs_target = pend_tgt;
        rs_mispredict = pend_v && pend_mis;
        if_req = !(pend_v && pend_mis);
        if_pc = pc;
        pend_v = 0;
        #1;
        if (if_req && if_ready) begin
          addr_t tgt, pred;
          f_all++;
          if (if_src == SRC_L0) l0_all++;
          if (iter >= WARM) begin
            f_steady++;
            if (if_src == SRC_L0) l0_steady++;
          end
          check(if_instr == instr_of(pc), "instruction");
          pred = if_pred_taken ? if_pred_target : pc + 4;
          if (off == BLEN - 1) begin
            // block-ending branch: next block, or the next phase after the last loop
            blk = (blk + 1) % NBLK;
            if (blk == 0) iter++;
            tgt = (iter == ITERS && ph + 1 < NPH) ? bstart(ph + 1, 0) : bstart(ph, blk);
            pend_v = 1; pend_pc = pc; pend_tgt = tgt; pend_mis = (pred != tgt);
            off = 0;
          end else begin
            check(!if_pred_taken, "non-branch predicted taken");
            tgt = pc + 4;
            off++;
          end
          pc = tgt;
        end
      end
      total += f_all;
      $display("phase %0d: fetches=%0d L0 share=%0.1f%% (steady %0.1f%%) L0 miss rate=%0.2f%%",
               ph, f_all, 100.0 * l0_all / f_all, 100.0 * l0_steady / f_steady,
               100.0 * (n_miss - miss0) / f_all);
      check(10 * l0_steady >= 9 * f_steady, $sformatf("phase %0d steady L0 share", ph));
      check(stage == STAGE_MONITOR, $sformatf("phase %0d ends in monitoring", ph));
    end
    $display("enter monitor=%0d enter profile=%0d", n_mon, n_prof);
    check(n_mon == NPH, "one monitoring stage per phase");
    check(n_prof == NPH - 1, "one new profiling stage per phase change");
    check(100 * n_miss < 2 * total, "L0 miss rate below 2 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
