// hs_mode_ctrl: fetch mode controller (L0 / L1 / promoting).
//
// The fetch mode is a register that decides where the instructions after the last
// taken branch are fetched. It changes on these events, in this priority:
//   mispredict                   -> L1  (resolved branch was mispredicted)
//   l0_miss                      -> L1  (an L0-mode fetch missed)
//   btb_hit, hot-block flag set  -> L0
//   btb_hit, profiling, counter reaches the candidate threshold -> PROMOTE
//   btb_hit, profiling, prev-hot flag set                       -> L0
//   btb_hit otherwise            -> L1
//   PROMOTE while monitoring     -> L1  (no promotion once L0 is full)
// A fetch that misses the BTB (sequential code, a fall-through or an unknown taken
// branch) leaves the mode unchanged. btb_hit must only be high for a fetch that is
// actually delivered. The new mode applies from the next cycle. Reset gives L1.
// The events come from the document's fetch-mode table; the priority between them,
// the reset mode and leaving promoting mode at the end of profiling are this
// design's choices.
module hs_mode_ctrl
  import hs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  stage_e      stage,
  input  logic        btb_hit,
  input  logic        hot,
  input  logic        prev_hot,
  input  logic        reach,
  input  logic        l0_miss,
  input  logic        mispredict,
  output fetch_mode_e mode
);

  fetch_mode_e mode_d;

  always_comb begin
    mode_d = mode;
    if (mispredict || l0_miss) begin
      mode_d = MODE_L1;
    end else if (btb_hit) begin
      if (hot)                                        mode_d = MODE_L0;
      else if (stage == STAGE_PROFILE && reach)       mode_d = MODE_PROMOTE;
      else if (stage == STAGE_PROFILE && prev_hot)    mode_d = MODE_L0;
      else                                            mode_d = MODE_L1;
    end else if (mode == MODE_PROMOTE && stage == STAGE_MONITOR) begin
      mode_d = MODE_L1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode <= MODE_L1;
    else        mode <= mode_d;
  end

endmodule
