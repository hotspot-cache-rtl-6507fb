// hs_btb: branch target buffer extended for hot-spot detection.
//
// A set-associative BTB (64 sets x 4 ways by default) of taken branches. Besides
// tag and target, every entry holds an execution counter and two flag bits. The
// two flags alternate as "hot-block" and "prev-hot" flag: hot_sel names the bank
// currently written as hot-block, the other bank is prev-hot. Swapping roles by
// toggling hot_sel avoids copying flags at a phase change.
//
// Lookup (combinational): lk_pc is compared in all ways of its set; lk_hit,
// lk_target, lk_hot, lk_prev and lk_reach (this execution brings the counter to
// the candidate threshold) are valid in the same cycle. When lk_en is high (the
// instruction is really fetched) and the stage is profiling, a hit on an entry
// whose hot-block flag is 0 increments its counter; the THRESHOLD-th such hit sets
// the hot-block flag and clears the counter. Nothing is counted while monitoring.
//
// Update (registered): a resolved taken branch (rs_valid && rs_taken) that misses
// is allocated with a zero counter and clear flags; one that hits gets its target
// refreshed. The victim is an invalid way, else a way with neither flag set
// (non-hot), else the way of a per-set round-robin pointer.
//
// Flash operations at a clock edge: clr_prev clears the prev-hot bank in every
// entry, clr_cnt clears every execution counter.
//
// Follows the document: geometry, per-entry counter and flags, counting on BTB hits,
// promotion at the threshold, alternating flag banks and non-hot-first replacement.
// This design's own choices: counter width 6 bits so that it can reach the
// threshold of 64, counting only in profiling for non-hot entries, clearing the
// counter at promotion, round-robin as the fall-back victim choice, no direction
// predictor (a hit predicts taken), and entries kept when a branch falls through.
module hs_btb
  import hs_pkg::*;
#(
  parameter int unsigned SETS      = 64,
  parameter int unsigned WAYS      = 4,
  parameter int unsigned THRESHOLD = 64,
  parameter int unsigned CNT_W     = $clog2(THRESHOLD)
) (
  input  logic   clk,
  input  logic   rst_n,
  // fetch-stage lookup
  input  addr_t  lk_pc,
  input  logic   lk_en,
  output logic   lk_hit,
  output addr_t  lk_target,
  output logic   lk_hot,
  output logic   lk_prev,
  output logic   lk_reach,
  // stage and flag-bank control
  input  logic   profiling,
  input  logic   hot_sel,
  input  logic   clr_prev,
  input  logic   clr_cnt,
  // branch resolution
  input  logic   rs_valid,
  input  addr_t  rs_pc,
  input  logic   rs_taken,
  input  addr_t  rs_target
);

  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = ADDR_W - 2 - IDX_W;

  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    addr_t             target;
    logic [CNT_W-1:0]  cnt;
    logic [1:0]        flag;   // flag[hot_sel] = hot-block, flag[!hot_sel] = prev-hot
  } entry_t;

  entry_t           tbl [SETS][WAYS];
  logic [WAY_W-1:0] rr  [SETS];

  function automatic logic [IDX_W-1:0] idx_of(addr_t a);
    return a[2 +: IDX_W];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  // ---------------- lookup ----------------
  logic [IDX_W-1:0] lk_idx;
  logic [WAY_W-1:0] lk_way;
  entry_t           lk_e;

  always_comb begin
    lk_idx = idx_of(lk_pc);
    lk_hit = 1'b0;
    lk_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!lk_hit && tbl[lk_idx][w].valid && tbl[lk_idx][w].tag == tag_of(lk_pc)) begin
        lk_hit = 1'b1;
        lk_way = WAY_W'(w);
      end
    end
    lk_e      = tbl[lk_idx][lk_way];
    lk_target = lk_e.target;
    lk_hot    = lk_hit && lk_e.flag[hot_sel];
    lk_prev   = lk_hit && lk_e.flag[!hot_sel];
    lk_reach  = lk_hit && profiling && !lk_e.flag[hot_sel] &&
                (32'(lk_e.cnt) == THRESHOLD - 1);
  end

  wire count_en = lk_en && lk_hit && profiling && !lk_e.flag[hot_sel];

  // ---------------- resolution ----------------
  logic [IDX_W-1:0] rs_idx;
  logic             rs_hit;
  logic [WAY_W-1:0] rs_way;
  logic [WAY_W-1:0] victim;
  logic             found_inv, found_cold;
  logic [WAY_W-1:0] way_inv, way_cold;

  always_comb begin
    rs_idx = idx_of(rs_pc);
    rs_hit = 1'b0;
    rs_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!rs_hit && tbl[rs_idx][w].valid && tbl[rs_idx][w].tag == tag_of(rs_pc)) begin
        rs_hit = 1'b1;
        rs_way = WAY_W'(w);
      end
    end
    // victim: first invalid way, else first non-hot way from the round-robin pointer
    found_inv  = 1'b0;
    found_cold = 1'b0;
    way_inv    = '0;
    way_cold   = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!found_inv && !tbl[rs_idx][w].valid) begin
        found_inv = 1'b1;
        way_inv   = WAY_W'(w);
      end
    end
    for (int k = 0; k < WAYS; k++) begin
      logic [WAY_W-1:0] w;
      w = WAY_W'((32'(rr[rs_idx]) + k) % WAYS);
      if (!found_cold && tbl[rs_idx][w].flag == 2'b00) begin
        found_cold = 1'b1;
        way_cold   = w;
      end
    end
    victim = found_inv ? way_inv : (found_cold ? way_cold : rr[rs_idx]);
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) tbl[s][w] <= '0;
      end
    end else begin
      // flash clears
      for (int s = 0; s < SETS; s++) begin
        for (int w = 0; w < WAYS; w++) begin
          if (clr_prev) tbl[s][w].flag[!hot_sel] <= 1'b0;
          if (clr_cnt)  tbl[s][w].cnt <= '0;
        end
      end
      // execution counting and promotion
      if (count_en) begin
        if (lk_reach) begin
          tbl[lk_idx][lk_way].flag[hot_sel] <= 1'b1;
          tbl[lk_idx][lk_way].cnt           <= '0;
        end else begin
          tbl[lk_idx][lk_way].cnt <= lk_e.cnt + 1'b1;
        end
      end
      // allocation and target update
      if (rs_valid && rs_taken) begin
        if (rs_hit) begin
          tbl[rs_idx][rs_way].target <= rs_target;
        end else begin
          tbl[rs_idx][victim] <= '{valid: 1'b1, tag: tag_of(rs_pc), target: rs_target,
                                   cnt: '0, flag: 2'b00};
          rr[rs_idx] <= WAY_W'((32'(victim) + 1) % WAYS);
        end
      end
    end
  end

endmodule
