// Testbench for hs_phase_ctrl: promotes lines one at a time and checks that the
// stage turns to monitoring exactly on the 16th promoted line (a full 512 B / 32 B
// L0 cache), that enter_monitor and enter_profile pulse once per transition, that
// monitoring ignores promotions, and that each saturation of the monitor counter
// starts profiling again with the flag bank swapped and the count cleared.
module hs_phase_ctrl_tb;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic promote_line, mon_sat;
  stage_e stage;
  logic hot_sel, enter_monitor, enter_profile;
  logic [4:0] promoted;
  int checks = 0, failures = 0;

  hs_phase_ctrl dut (.clk, .rst_n, .promote_line, .mon_sat, .stage, .hot_sel,
                     .enter_monitor, .enter_profile, .promoted);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic exp_sel;
    promote_line = 0; mon_sat = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check(stage == STAGE_PROFILE && hot_sel == 0 && promoted == 0, "reset state");
    exp_sel = 0;
    for (int round = 0; round < 4; round++) begin
      // saturation while profiling does nothing
      mon_sat = 1; #1;
      check(!enter_profile, "no enter_profile while profiling");
      @(posedge clk); #1; mon_sat = 0;
      check(stage == STAGE_PROFILE, "still profiling");
      for (int i = 1; i <= 16; i++) begin
        // idle cycles between promotions
        repeat ($urandom % 3) begin @(posedge clk); #1; end
        promote_line = 1; #1;
        check(enter_monitor == (i == 16), $sformatf("enter_monitor at line %0d", i));
        @(posedge clk); #1; promote_line = 0;
        check((stage == STAGE_MONITOR) == (i == 16), $sformatf("stage after line %0d", i));
        if (i < 16) check(promoted == 5'(i), "promoted count");
      end
      // promotions in monitoring are ignored
      promote_line = 1; #1;
      check(!enter_monitor, "no enter_monitor while monitoring");
      @(posedge clk); #1; promote_line = 0;
      check(stage == STAGE_MONITOR && hot_sel == exp_sel, "monitoring holds");
      repeat (5) @(posedge clk);
      #1;
      mon_sat = 1; #1;
      check(enter_profile, "enter_profile on saturation");
      @(posedge clk); #1; mon_sat = 0;
      exp_sel = !exp_sel;
      check(stage == STAGE_PROFILE && hot_sel == exp_sel && promoted == 0, "new profiling stage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
