// tb_secret_controller -- checks the suspension window the controller
// derives from an alarm: with the default parameters (BUS_CYCLE 10,
// T_RED 4, T_SUSP 2, T_LEAD 1 bus cycles) suspend rises
// T_RED - T_SUSP + T_LEAD + 1 = 31 clocks after the alarm clock and stays
// high for T_SUSP = 20 clocks; threat covers the alarm up to the end of the
// window; a second alarm during a window extends it; run-time
// configuration changes the parameters; a window that would start before
// the alarm starts at once.
module tb_secret_controller;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic alarm = 0, cfg_we = 0, cfg_filter = 1;
  logic [7:0] cfg_t_red = 0, cfg_t_susp = 0, t_red, t_susp;
  logic filter_en, suspend, emulate, threat;

  secret_controller dut (.clk, .reset, .alarm_i(alarm), .cfg_we_i(cfg_we), .cfg_t_red_i(cfg_t_red),
    .cfg_t_susp_i(cfg_t_susp), .cfg_filter_en_i(cfg_filter), .t_red_o(t_red), .t_susp_o(t_susp),
    .filter_en_o(filter_en), .suspend_o(suspend), .security_emulate_o(emulate), .threat_o(threat));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // record, relative to the alarm clock, when suspend is high
  task automatic window(input int exp_start, input int exp_len, input int second_at = -1);
    int first = -1, len = 0, threat_bad = 0, emu_bad = 0;
    @(negedge clk); alarm = 1;
    for (int t = 0; t < 150; t++) begin
      #1;
      if (suspend) begin if (first < 0) first = t; len++; end
      if (emulate !== suspend) emu_bad++;
      if ((t <= exp_start + exp_len - 1) && !threat) threat_bad++;
      if ((t > exp_start + exp_len + 1) && threat) threat_bad++;
      @(negedge clk);
      alarm = (t + 1 == second_at);
    end
    checks++;
    if (first != exp_start || len != exp_len) begin
      failures++; $display("FAIL window starts %0d lasts %0d, expected %0d / %0d", first, len, exp_start, exp_len);
    end
    checks++;
    if (threat_bad != 0 || emu_bad != 0) begin failures++; $display("FAIL threat/emulate flags"); end
  endtask

  initial begin
    repeat (2) @(negedge clk); reset = 0;
    checks++;
    if (t_red != 40 || t_susp != 20 || !filter_en) begin failures++; $display("FAIL defaults"); end
    window(31, 20);
    window(31, 20 + 5, 5);            // second alarm 5 clocks later extends by 5
    @(negedge clk); cfg_we = 1; cfg_t_red = 30; cfg_t_susp = 15; cfg_filter = 0;
    @(negedge clk); cfg_we = 0;
    checks++;
    if (t_red != 30 || t_susp != 15 || filter_en) begin failures++; $display("FAIL config"); end
    window(30 - 15 + 10 + 1, 15);
    @(negedge clk); cfg_we = 1; cfg_t_red = 5; cfg_t_susp = 30; cfg_filter = 1;
    @(negedge clk); cfg_we = 0;
    window(1, 30);                    // offset clamped to 0: at once
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
