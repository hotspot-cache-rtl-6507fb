// Testbench for hs_mode_ctrl: random event streams against a reference written
// from the fetch-mode table (L0 / L1 / promoting events), plus directed sequences
// for each row of the table. The mode must change one clock after its event.
module hs_mode_ctrl_tb;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  stage_e stage;
  logic btb_hit, hot, prev_hot, reach, l0_miss, mispredict;
  fetch_mode_e mode;
  int checks = 0, failures = 0;
  fetch_mode_e model;
  int seen [3];

  hs_mode_ctrl dut (.clk, .rst_n, .stage, .btb_hit, .hot, .prev_hot, .reach,
                    .l0_miss, .mispredict, .mode);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fetch_mode_e ref_next(fetch_mode_e cur);
    bit prof = (stage == STAGE_PROFILE);
    if (mispredict) return MODE_L1;                         // L1 (4)
    if (l0_miss) return MODE_L1;                            // L1 (3)
    if (btb_hit) begin
      if (prof && !hot && reach) return MODE_PROMOTE;       // promoting row
      if (prof && (hot || prev_hot)) return MODE_L0;        // L0 (1)
      if (!prof && hot) return MODE_L0;                     // L0 (2)
      return MODE_L1;                                       // L1 (1), (2)
    end
    if (!prof && cur == MODE_PROMOTE) return MODE_L1;
    return cur;
  endfunction

  task automatic step(stage_e s, logic b, logic h, logic p, logic r, logic m, logic x);
    stage = s; btb_hit = b; hot = h; prev_hot = p; reach = r; l0_miss = m; mispredict = x;
    #1;
    model = ref_next(model);
    @(posedge clk); #1;
    checks++;
    seen[model]++;
    if (mode != model) begin
      failures++;
      $display("FAIL mode=%0d expected=%0d", mode, model);
    end
  endtask

  initial begin
    stage = STAGE_PROFILE; btb_hit = 0; hot = 0; prev_hot = 0; reach = 0;
    l0_miss = 0; mispredict = 0; model = MODE_L1;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    checks++; if (mode != MODE_L1) failures++;
    // directed: each table row
    step(STAGE_PROFILE, 1, 0, 0, 1, 0, 0); checks++; if (mode != MODE_PROMOTE) failures++;
    step(STAGE_PROFILE, 0, 0, 0, 0, 0, 0); checks++; if (mode != MODE_PROMOTE) failures++;
    step(STAGE_PROFILE, 1, 1, 0, 0, 0, 0); checks++; if (mode != MODE_L0) failures++;
    step(STAGE_PROFILE, 0, 0, 0, 0, 1, 0); checks++; if (mode != MODE_L1) failures++;
    step(STAGE_PROFILE, 1, 0, 1, 0, 0, 0); checks++; if (mode != MODE_L0) failures++;
    step(STAGE_PROFILE, 0, 0, 0, 0, 0, 1); checks++; if (mode != MODE_L1) failures++;
    step(STAGE_MONITOR, 1, 1, 0, 0, 0, 0); checks++; if (mode != MODE_L0) failures++;
    step(STAGE_MONITOR, 1, 0, 1, 0, 0, 0); checks++; if (mode != MODE_L1) failures++;
    step(STAGE_PROFILE, 1, 0, 0, 0, 0, 0); checks++; if (mode != MODE_L1) failures++;
    step(STAGE_PROFILE, 1, 0, 0, 1, 0, 0);
    step(STAGE_MONITOR, 0, 0, 0, 0, 0, 0); checks++; if (mode != MODE_L1) failures++;
    // random
    repeat (20000) begin
      step(stage_e'($urandom % 2), $urandom % 2, ($urandom % 3) == 0, ($urandom % 3) == 0,
           ($urandom % 4) == 0, ($urandom % 8) == 0, ($urandom % 10) == 0);
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL mode %0d never seen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
