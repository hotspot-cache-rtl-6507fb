// hs_phase_ctrl: profiling / monitoring stage controller.
//
// After reset the front end profiles. Each line fetched in promoting mode (whether
// it had to be copied into the L0 cache or was there already) is reported once on
// promote_line; when the count of lines promoted in
// this profiling stage reaches the number of L0 lines (the L0 cache is full), the
// controller enters monitoring. In monitoring the monitor counter runs; when it
// saturates (mon_sat) the controller re-enters profiling.
//
// Both transitions are announced one cycle ahead on combinational pulses that act
// at the same clock edge as the stage change:
//   enter_monitor: clear every prev-hot flag and reload the monitor counter;
//   enter_profile: swap the hot-block / prev-hot flag banks (hot_sel toggles),
//                  clear the execution counters and the promoted-line count.
// The two stages, the fill limit, the bank swap and the prev-hot clear follow the
// document. Clearing the execution counters at a new profiling stage, and measuring
// "filled" as a count of promoted lines equal to the L0 line count, are this
// design's choices.
module hs_phase_ctrl
  import hs_pkg::*;
#(
  parameter int unsigned L0_LINES = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   promote_line,
  input  logic   mon_sat,
  output stage_e stage,
  output logic   hot_sel,
  output logic   enter_monitor,
  output logic   enter_profile,
  output logic [$clog2(L0_LINES+1)-1:0] promoted
);

  localparam int unsigned PW = $clog2(L0_LINES + 1);

  always_comb begin
    enter_monitor = (stage == STAGE_PROFILE) && promote_line &&
                    (32'(promoted) + 1 >= L0_LINES);
    enter_profile = (stage == STAGE_MONITOR) && mon_sat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage    <= STAGE_PROFILE;
      hot_sel  <= 1'b0;
      promoted <= '0;
    end else if (enter_monitor) begin
      stage    <= STAGE_MONITOR;
      promoted <= PW'(L0_LINES);
    end else if (enter_profile) begin
      stage    <= STAGE_PROFILE;
      hot_sel  <= !hot_sel;
      promoted <= '0;
    end else if (stage == STAGE_PROFILE && promote_line) begin
      promoted <= promoted + 1'b1;
    end
  end

endmodule
