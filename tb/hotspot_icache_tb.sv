// End-to-end testbench for hotspot_icache at its default parameters (64x4 BTB,
// candidate threshold 64, 512 B L0, 16 KB L1, 8-bit monitor counter).
//
// A core model runs a synthetic program through the fetch port and resolves each
// branch one cycle after it is fetched; a mispredicted branch costs one bubble
// cycle and a redirect. The program has three phases:
//   A: 10 basic blocks in a loop, some ending in self-loops (trip count 3) and
//      some in rarely not-taken branches; its hot code fits the L0 cache well.
//   B: 28 basic blocks at a 256 B stride whose footprint exceeds the L0 cache;
//      its branches crowd a few BTB sets (forcing BTB replacement) and its lines
//      conflict in the L0 cache. Here the hot share can fall below one half while
//      the program stays in the same code: re-profiling then uses prev-hot flags.
//   A again.
// Checked: every delivered instruction equals the memory model's word; a non-branch
// is never predicted taken; the fetch source agrees with the mode; an L0 miss puts
// the next cycle in L1 mode; monitoring starts exactly when the 16th line has been
// promoted; the monitor counter equals an independent model and a new profiling
// stage starts exactly when it saturates; the flag bank alternates; no hot BTB entry
// is evicted while its set has a non-hot one. Every mechanism must occur at least
// once: L0, line-buffer and L1 fetches, L1 refills, promotions, L0 writes, L0
// misses, mispredictions, both stage changes, L0 mode chosen by a prev-hot flag, BTB
// replacement in a full set, and promoting mode ended by the start of monitoring.
module hotspot_icache_tb;
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
  longint cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cycles, what);
    end
  endtask

  // ---------------- program model ----------------
  localparam int NREG = 2;
  localparam int TRIP = 3;
  addr_t base   [NREG] = '{32'h0040_0000, 32'h0041_0000};
  int    stride [NREG] = '{128, 256};
  int    nblk   [NREG] = '{10, 28};
  int    blen   [NREG][32];
  int    bkind  [NREG][32];   // 0: always taken, 1: self-loop, 2: rarely not taken
  int    loopcnt[NREG][32];
  int    sched_reg  [3] = '{0, 1, 0};
  int    sched_iter [3] = '{300, 250, 200};
  int    sched_idx = 0, iter = 0;
  bit    done = 0;

  function automatic addr_t bstart(int r, int i);
    return base[r] + addr_t'(i * stride[r]);
  endfunction

  // Executes the instruction at pc: is it a branch, is it taken, and where to.
  task automatic exec(addr_t pc, output bit is_br, output bit taken, output addr_t tgt);
    int r = sched_reg[sched_idx];
    int i = int'(pc - base[r]) / stride[r];
    int off = int'(pc - bstart(r, i)) / 4;
    int nxt = (i + 1) % nblk[r];
    is_br = 0; taken = 0; tgt = pc + 4;
    if (off == blen[r][i] - 1) begin
      is_br = 1;
      taken = 1;
      tgt = bstart(r, nxt);
      if (bkind[r][i] == 1) begin
        loopcnt[r][i]++;
        if (loopcnt[r][i] < TRIP) tgt = bstart(r, i);
        else begin loopcnt[r][i] = 0; taken = 0; tgt = pc + 4; end
      end else if (bkind[r][i] == 2 && ($urandom % 16) == 0) begin
        taken = 0; tgt = pc + 4;
      end
      if (i == nblk[r] - 1) begin
        iter++;
        if (iter == sched_iter[sched_idx]) begin
          iter = 0;
          sched_idx++;
          if (sched_idx == 3) done = 1;
          else tgt = bstart(sched_reg[sched_idx], 0);
        end
      end
    end else if (off == blen[r][i] + 1) begin
      is_br = 1; taken = 1; tgt = bstart(r, nxt);   // fall-through stub
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_src[4];
  int n_refill = 0, n_l0_miss = 0, n_promote = 0, n_l0_write = 0, n_enter_mon = 0;
  int n_enter_prof = 0, n_mispredict = 0, n_prevhot_l0 = 0, n_btb_evict = 0;
  int n_promote_stop = 0, n_fetch = 0;
  int mon_model = 128;
  logic exp_sel = 0;

  always @(posedge clk) if (rst_n) begin
    if (mem_req && mem_ack) n_refill++;
    if (ev_l0_miss) n_l0_miss++;
    if (ev_promote_line) n_promote++;
    if (ev_l0_write) n_l0_write++;
    if (rs_valid && rs_mispredict) n_mispredict++;
    if (mode == MODE_PROMOTE && stage == STAGE_MONITOR) n_promote_stop++;
    if (if_req && if_ready && if_pred_taken && stage == STAGE_PROFILE &&
        !dut.btb_hot && dut.btb_prev && !dut.btb_reach) n_prevhot_l0++;
    if (rs_valid && rs_taken && !dut.u_btb.rs_hit && !dut.u_btb.found_inv) begin
      n_btb_evict++;
      check(!(dut.u_btb.found_cold &&
              dut.u_btb.tbl[dut.u_btb.rs_idx][dut.u_btb.victim].flag != 2'b00),
            "hot BTB entry evicted while a non-hot one was available");
    end
    // stage changes
    if (ev_enter_monitor) begin
      n_enter_mon++;
      check(promoted_lines == 5'd15 && ev_promote_line, "monitoring starts at the 16th line");
    end
    if (ev_enter_profile) n_enter_prof++;
    // independent monitor counter
    check(ev_enter_profile == (stage == STAGE_MONITOR && mon_model == 255),
          "profiling restarts exactly at saturation");
    check(stage != STAGE_MONITOR || int'(mon_value) == mon_model, "monitor counter value");
    if (ev_enter_monitor) mon_model = 128;
    else if (stage == STAGE_MONITOR && if_req && if_ready && if_pred_taken) begin
      if (dut.btb_hot) mon_model = (mon_model > 0) ? mon_model - 1 : 0;
      else mon_model = (mon_model < 255) ? mon_model + 1 : 255;
    end
    if (ev_enter_profile) exp_sel = !exp_sel;
  end

  always @(negedge clk) if (rst_n) check(hot_sel == exp_sel, "flag bank alternates");

  // ---------------- core model ----------------
  initial begin
    addr_t pc;
    bit pend_v, pend_taken, pend_mis;
    addr_t pend_pc, pend_tgt;
    bit was_l0_miss;
    for (int r = 0; r < NREG; r++)
      for (int i = 0; i < 32; i++) begin
        blen[r][i]    = (r == 0) ? 6 + (i * 7) % 13 : 6 + (i * 7) % 5;
        bkind[r][i]   = (i == nblk[r] - 1) ? 0 : (i % 4 == 1) ? 1 : (i % 4 == 3) ? 2 : 0;
        loopcnt[r][i] = 0;
      end
    if_req = 0; if_pc = '0;
    rs_valid = 0; rs_pc = '0; rs_taken = 0; rs_target = '0; rs_mispredict = 0;
    pend_v = 0; pend_taken = 0; pend_mis = 0; pend_pc = '0; pend_tgt = '0;
    was_l0_miss = 0;
    pc = bstart(0, 0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!done) begin
      @(negedge clk);
      check(!was_l0_miss || mode == MODE_L1, "L1 mode after an L0 miss");
      rs_valid = pend_v; rs_pc = pend_pc; rs_taken = pend_taken; rs_target = pend_tgt;
      rs_mispredict = pend_v && pend_mis;
      if_req = !(pend_v && pend_mis);
      if_pc  = pc;
      pend_v = 0;
      #1;
      was_l0_miss = ev_l0_miss;
      if (if_req && if_ready) begin
        bit is_br, taken;
        addr_t tgt, pred;
        n_fetch++;
        n_src[if_src]++;
        check(if_instr == instr_of(pc), $sformatf("instruction at %h", pc));
        check((if_src == SRC_L0) == (mode == MODE_L0), "source agrees with mode");
        pred = if_pred_taken ? if_pred_target : pc + 4;
        exec(pc, is_br, taken, tgt);
        if (!is_br) check(!if_pred_taken, "non-branch predicted taken");
        if (is_br) begin
          pend_v = 1; pend_pc = pc; pend_taken = taken; pend_tgt = tgt;
          pend_mis = (pred != tgt);
        end
        pc = tgt;
      end
    end
    @(negedge clk);
    rs_valid = pend_v; rs_pc = pend_pc; rs_taken = pend_taken; rs_target = pend_tgt;
    rs_mispredict = pend_v && pend_mis;
    if_req = 0;
    @(negedge clk);
    rs_valid = 0;
    $display("fetches=%0d cycles=%0d  L0=%0d LB=%0d L1=%0d refills=%0d", n_fetch, cycles,
             n_src[SRC_L0], n_src[SRC_LB], n_src[SRC_L1], n_refill);
    $display("L0 access share=%0.1f%%  L0 miss rate=%0.2f%%",
             100.0 * n_src[SRC_L0] / n_fetch, 100.0 * n_l0_miss / n_fetch);
    $display("promoted lines=%0d L0 writes=%0d L0 misses=%0d mispredicts=%0d",
             n_promote, n_l0_write, n_l0_miss, n_mispredict);
    $display("enter monitor=%0d enter profile=%0d prev-hot L0=%0d BTB evictions=%0d promote stopped=%0d",
             n_enter_mon, n_enter_prof, n_prevhot_l0, n_btb_evict, n_promote_stop);
    check(n_src[SRC_L0] > 0, "L0 fetches happen");
    check(n_src[SRC_LB] > 0, "line-buffer fetches happen");
    check(n_src[SRC_L1] > 0, "L1 fetches happen");
    check(n_refill > 0 && n_refill == served, "L1 refills happen");
    check(n_promote > 0, "promotions happen");
    check(n_l0_write > 0, "L0 writes happen");
    check(n_l0_miss > 0, "L0 misses happen");
    check(n_mispredict > 0, "mispredictions happen");
    check(n_enter_mon > 0, "monitoring stage entered");
    check(n_enter_prof > 0, "profiling stage re-entered");
    check(n_prevhot_l0 > 0, "L0 mode from a prev-hot flag");
    check(n_btb_evict > 0, "BTB replacement in a full set");
    check(n_promote_stop > 0, "promoting mode ended by monitoring");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
