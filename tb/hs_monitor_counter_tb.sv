// Testbench for hs_monitor_counter: drives random load / count-up / count-down
// traffic and compares value and sat against an integer model every cycle. Also
// checks that 127 non-hot branches in a row from the start value reach saturation
// exactly on the 127th one.
module hs_monitor_counter_tb;
  logic clk = 0, rst_n = 0;
  logic load, en, hot;
  logic [7:0] value;
  logic sat;
  int checks = 0, failures = 0;
  int model;

  hs_monitor_counter dut (.clk, .rst_n, .load, .en, .hot, .value, .sat);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic l, logic e, logic h);
    load = l; en = e; hot = h;
    @(posedge clk);
    if (l) model = 128;
    else if (e && h && model > 0) model--;
    else if (e && !h && model < 255) model++;
    #1;
    checks++;
    if (value != 8'(model) || sat != (model == 255)) begin
      failures++;
      $display("FAIL value=%0d sat=%0b model=%0d", value, sat, model);
    end
  endtask

  initial begin
    load = 0; en = 0; hot = 0; model = 128;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (value != 8'd128) failures++;
    // 127 non-hot branches saturate the counter, not one earlier
    for (int i = 1; i <= 127; i++) begin
      step(0, 1, 0);
      checks++;
      if (sat != (i == 127)) begin failures++; $display("FAIL sat at %0d", i); end
    end
    step(0, 1, 0);              // stays saturated
    step(1, 1, 0);              // load wins over count
    repeat (140) step(0, 1, 1); // down to zero and hold
    repeat (3000) step(($urandom % 50) == 0, $urandom % 2, ($urandom % 3) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
