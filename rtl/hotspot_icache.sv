// hotspot_icache: instruction-fetch front end with a hot-spot managed L0 cache.
//
// The front end keeps only the hot basic blocks of the current program phase in a
// small L0 cache and fetches everything else from the L1 cache, so that most
// fetches hit the cheap L0 array while the L0 miss rate, and with it the slowdown,
// stays low. Hot blocks are found with the branch target buffer: each BTB entry
// counts how often its taken branch executes, and a branch that reaches the
// candidate threshold while profiling has the basic block at its target copied
// into the L0 cache (promoting mode). Once as many lines have been promoted as the
// L0 cache holds, profiling stops and a monitor counter watches the share of hot
// branches; when non-hot branches dominate, a new profiling stage starts. The hot
// flags of the previous phase stay usable as prev-hot flags until the next
// monitoring stage, so L0 is not left idle while the new phase warms up.
//
// Fetch interface (one instruction per cycle): the core holds if_req and if_pc;
// the instruction is delivered in the cycle if_ready is high, with its source
// (if_src), and with the BTB's prediction for that address (if_pred_taken,
// if_pred_target). Per mode:
//   L0 mode:       L0 hit -> delivered this cycle. L0 miss -> not delivered; the
//                  mode drops to L1 and the fetch is served next cycle.
//   L1 mode:       line-buffer hit -> delivered, L1 arrays idle. Else L1 read; hit
//                  -> delivered and the line goes into the line buffer. L1 miss ->
//                  refill over mem_req/mem_addr/mem_ack/mem_line, then served.
//   promoting:     as L1 mode; while profiling, each line delivered is a promoted
//                  line (counted once per run of fetches in it) and, if the L0 cache
//                  does not hold it, it is written into the L0 cache.
// Branch resolution: rs_valid with rs_pc, rs_taken, rs_target updates the BTB; a
// mispredicted branch (rs_mispredict) forces L1 mode. The core redirects its own PC.
// Status outputs expose the stage, the flag bank, the monitor counter and one-cycle
// event strobes for statistics. Assertions check that an L0 miss always leads to
// L1 mode, that the fetch source matches the mode and that nothing is promoted
// while monitoring.
//
// The mechanism (counters and two flags per BTB entry, threshold promotion, fill
// limit, monitor counter, the mode table and the line buffer) follows the document;
// the cycle timing of the fetch port and the one-cycle L0 miss penalty are this
// design's choices.
module hotspot_icache
  import hs_pkg::*;
#(
  parameter int unsigned BTB_SETS      = 64,
  parameter int unsigned BTB_WAYS      = 4,
  parameter int unsigned THRESHOLD     = 64,
  parameter int unsigned L0_BYTES      = 512,
  parameter int unsigned L1_BYTES      = 16384,
  parameter int unsigned MON_W         = 8,
  parameter int unsigned MON_INIT      = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  // fetch
  input  logic        if_req,
  input  addr_t       if_pc,
  output logic        if_ready,
  output instr_t      if_instr,
  output fetch_src_e  if_src,
  output logic        if_pred_taken,
  output addr_t       if_pred_target,
  // branch resolution
  input  logic        rs_valid,
  input  addr_t       rs_pc,
  input  logic        rs_taken,
  input  addr_t       rs_target,
  input  logic        rs_mispredict,
  // next memory level
  output logic        mem_req,
  output addr_t       mem_addr,
  input  logic        mem_ack,
  input  line_t       mem_line,
  // status
  output fetch_mode_e mode,
  output stage_e      stage,
  output logic        hot_sel,
  output logic [MON_W-1:0] mon_value,
  output logic [$clog2(L0_BYTES/LINE_BYTES+1)-1:0] promoted_lines,
  output logic        ev_l0_miss,
  output logic        ev_promote_line,
  output logic        ev_l0_write,
  output logic        ev_enter_monitor,
  output logic        ev_enter_profile
);

  localparam int unsigned L0_LINES = L0_BYTES / LINE_BYTES;

  // ---------------- BTB ----------------
  logic  btb_hit, btb_hot, btb_prev, btb_reach;
  addr_t btb_target;
  logic  enter_monitor, enter_profile;
  logic  mon_sat;

  hs_btb #(.SETS(BTB_SETS), .WAYS(BTB_WAYS), .THRESHOLD(THRESHOLD)) u_btb (
    .clk, .rst_n,
    .lk_pc     (if_pc),
    .lk_en     (if_req && if_ready),
    .lk_hit    (btb_hit),
    .lk_target (btb_target),
    .lk_hot    (btb_hot),
    .lk_prev   (btb_prev),
    .lk_reach  (btb_reach),
    .profiling (stage == STAGE_PROFILE),
    .hot_sel   (hot_sel),
    .clr_prev  (enter_monitor),
    .clr_cnt   (enter_profile),
    .rs_valid  (rs_valid),
    .rs_pc     (rs_pc),
    .rs_taken  (rs_taken),
    .rs_target (rs_target)
  );

  assign if_pred_taken  = if_req && btb_hit;
  assign if_pred_target = btb_target;

  // ---------------- caches ----------------
  logic   l0_hit;
  instr_t l0_instr;
  logic   l0_wr;
  logic   lb_hit;
  instr_t lb_instr;
  line_t  lb_line;
  logic   lb_ld;
  logic   l1_rd, l1_hit, l1_busy;
  line_t  l1_line;
  line_t  cur_line;
  logic   promoting, promote_line;

  hs_l0_cache #(.SIZE_BYTES(L0_BYTES)) u_l0 (
    .clk, .rst_n,
    .rd_pc    (if_pc),
    .rd_hit   (l0_hit),
    .rd_instr (l0_instr),
    .wr_en    (l0_wr),
    .wr_pc    (if_pc),
    .wr_line  (cur_line)
  );

  hs_line_buffer u_lb (
    .clk, .rst_n,
    .rd_pc    (if_pc),
    .rd_hit   (lb_hit),
    .rd_instr (lb_instr),
    .rd_line  (lb_line),
    .ld_en    (lb_ld),
    .ld_pc    (if_pc),
    .ld_line  (l1_line)
  );

  hs_l1_cache #(.SIZE_BYTES(L1_BYTES)) u_l1 (
    .clk, .rst_n,
    .rd_en    (l1_rd),
    .rd_pc    (if_pc),
    .rd_hit   (l1_hit),
    .rd_line  (l1_line),
    .busy     (l1_busy),
    .mem_req  (mem_req),
    .mem_addr (mem_addr),
    .mem_ack  (mem_ack),
    .mem_line (mem_line)
  );

  // ---------------- fetch datapath ----------------
  always_comb begin
    if_ready   = 1'b0;
    if_instr   = '0;
    if_src     = SRC_NONE;
    ev_l0_miss = 1'b0;
    l1_rd      = 1'b0;
    lb_ld      = 1'b0;
    l0_wr      = 1'b0;
    cur_line   = lb_hit ? lb_line : l1_line;
    if (if_req) begin
      if (mode == MODE_L0) begin
        if (l0_hit) begin
          if_ready = 1'b1;
          if_instr = l0_instr;
          if_src   = SRC_L0;
        end else begin
          ev_l0_miss = 1'b1;
        end
      end else if (lb_hit) begin
        if_ready = 1'b1;
        if_instr = lb_instr;
        if_src   = SRC_LB;
      end else if (!l1_busy) begin
        l1_rd = 1'b1;
        if (l1_hit) begin
          if_ready = 1'b1;
          if_instr = line_word(l1_line, if_pc[2 +: WOFF_W]);
          if_src   = SRC_L1;
          lb_ld    = 1'b1;
        end
      end
      if (promoting && if_ready && !l0_hit)
        l0_wr = 1'b1;
    end
  end

  // A promoted line is counted once, on the first delivered fetch from it in a run
  // of promoting-mode fetches, whether or not the L0 cache already held it.
  logic                    prom_v;
  logic [ADDR_W-OFF_W-1:0] prom_ln;

  assign promoting    = (mode == MODE_PROMOTE) && (stage == STAGE_PROFILE);
  assign promote_line = promoting && if_req && if_ready &&
                        !(prom_v && prom_ln == if_pc[ADDR_W-1:OFF_W]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prom_v  <= 1'b0;
      prom_ln <= '0;
    end else if (!promoting) begin
      prom_v  <= 1'b0;
    end else if (promote_line) begin
      prom_v  <= 1'b1;
      prom_ln <= if_pc[ADDR_W-1:OFF_W];
    end
  end

  assign ev_promote_line  = promote_line;
  assign ev_l0_write      = l0_wr;
  assign ev_enter_monitor = enter_monitor;
  assign ev_enter_profile = enter_profile;

  // ---------------- control ----------------
  hs_phase_ctrl #(.L0_LINES(L0_LINES)) u_phase (
    .clk, .rst_n,
    .promote_line  (promote_line),
    .mon_sat       (mon_sat),
    .stage         (stage),
    .hot_sel       (hot_sel),
    .enter_monitor (enter_monitor),
    .enter_profile (enter_profile),
    .promoted      (promoted_lines)
  );

  hs_monitor_counter #(.W(MON_W), .INIT(MON_INIT)) u_mon (
    .clk, .rst_n,
    .load  (enter_monitor),
    .en    (stage == STAGE_MONITOR && if_req && if_ready && btb_hit),
    .hot   (btb_hot),
    .value (mon_value),
    .sat   (mon_sat)
  );

  hs_mode_ctrl u_mode (
    .clk, .rst_n,
    .stage      (stage),
    .btb_hit    (if_req && if_ready && btb_hit),
    .hot        (btb_hot),
    .prev_hot   (btb_prev),
    .reach      (btb_reach),
    .l0_miss    (ev_l0_miss),
    .mispredict (rs_valid && rs_mispredict),
    .mode       (mode)
  );

  // Mode rules that must hold whatever the core does.
  a_l0_miss_to_l1: assert property (@(posedge clk) disable iff (!rst_n)
    ev_l0_miss |=> mode == MODE_L1);
  a_src_matches_mode: assert property (@(posedge clk) disable iff (!rst_n)
    if_ready |-> ((if_src == SRC_L0) == (mode == MODE_L0)));
  a_no_promote_in_monitor: assert property (@(posedge clk) disable iff (!rst_n)
    stage == STAGE_MONITOR |-> !l0_wr);

endmodule
