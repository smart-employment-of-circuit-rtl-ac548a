// tb_secret_timing -- sweeps the two SECRET parameters at run time and
// checks, for each pair, whether the Trojan in the operating core fires.
//
// With isolation switched off only the suspension protects. For each
// (T_RED, T_SUSP) the system is reset and attacked: arming write at live
// clock W, read+write trigger at T, key read at T+1. The expected outcome
// is worked out here from the controller's timing rule: an alarm in
// clock A suspends the operating core in clocks A+off+1 ... A+off+T_SUSP,
// off = max(0, T_RED - T_SUSP + T_LEAD), and the request of live clock L
// reaches the operating core in clock L + T_RED. The Trojan fires in the
// operating core exactly when neither W nor T is suppressed. The sweep
// must contain both protected and unprotected pairs; among the unprotected
// are those where T_RED is shorter than the detection time (the first
// timing condition) and those where the window is too short or too late
// (the second).
module tb_secret_timing;
  import avs_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int T_LEAD = 10;
  localparam logic [23:0] PAT = 24'h5AC396;

  logic [4:0]  address = '0;
  logic [31:0] writedata = '0, readdata;
  logic        write = 1'b0, read = 1'b0, rvalid, waitreq, irq, threat, emulate, isolated;
  logic [2:0]  stored;
  logic        cfg_we = 1'b0;
  logic [7:0]  cfg_t_red = '0, cfg_t_susp = '0;

  secret_top dut (
    .clk, .reset,
    .avs_s1_address(address), .avs_s1_writedata(writedata), .avs_s1_write(write),
    .avs_s1_read(read), .avs_s1_readdata(readdata), .avs_s1_readdatavalid(rvalid),
    .avs_s1_waitrequest(waitreq), .avs_s1_irq(irq),
    .threat, .security_emulate(emulate), .isolated, .triggers_stored(stored),
    .cfg_we, .cfg_t_red, .cfg_t_susp, .cfg_filter_en(1'b0));

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  int alarm_at = -1;
  logic fired = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!reset && dut.alarm && alarm_at < 0) alarm_at <= cyc;
    if (!reset && dut.u_operating.g_trojan.u_hth.payload_o) fired <= 1;
  end

  function automatic logic blocked(input int l, input int a, input int t_red, input int t_susp);
    int off = t_red - t_susp + T_LEAD;
    if (off < 0) off = 0;
    return (l + t_red >= a + off + 1) && (l + t_red <= a + off + t_susp);
  endfunction

  int n_prot = 0, n_unprot = 0, n_late = 0;
  initial begin
    int reds[7]  = '{1, 5, 10, 20, 30, 40, 60};
    int susps[4] = '{5, 10, 20, 40};
    foreach (reds[i]) foreach (susps[j]) begin
      int w, t;
      logic exp_fired;
      reset = 1;
      repeat (3) @(negedge clk);
      reset = 0;
      alarm_at = -1; fired = 0;
      @(negedge clk); cfg_we = 1; cfg_t_red = 8'(reds[i]); cfg_t_susp = 8'(susps[j]);
      @(negedge clk); cfg_we = 0;
      // key for the leak, then the attack
      for (int k = 0; k < 4; k++) begin
        @(negedge clk); address = 5'(k); writedata = 32'h1000 + k; write = 1;
      end
      @(negedge clk); address = CTRL_ADDR; writedata = {PAT, 8'h80}; write = 1; w = cyc;
      @(negedge clk); address = 5'd20; writedata = 0; write = 1; read = 1; t = cyc;
      @(negedge clk); address = 5'd0; write = 0; read = 1;
      @(negedge clk); read = 0;
      repeat (reds[i] + susps[j] + 40) @(negedge clk);
      checks++;
      if (alarm_at < 0) begin
        failures++; $display("FAIL T_RED %0d T_SUSP %0d: no alarm", reds[i], susps[j]);
      end else begin
        exp_fired = !blocked(w, alarm_at, reds[i], susps[j]) && !blocked(t, alarm_at, reds[i], susps[j]);
        checks++;
        if (fired !== exp_fired) begin
          failures++;
          $display("FAIL T_RED %0d T_SUSP %0d: operating Trojan fired %b, expected %b (W %0d T %0d A %0d)",
                   reds[i], susps[j], fired, exp_fired, w, t, alarm_at);
        end
        if (exp_fired) n_unprot++; else n_prot++;
        if (exp_fired && reds[i] < alarm_at - t) n_late++;
      end
    end
    checks++;
    if (n_prot == 0 || n_unprot == 0 || n_late == 0) begin
      failures++; $display("FAIL sweep lacks a case: protected %0d unprotected %0d too-short T_RED %0d",
                           n_prot, n_unprot, n_late);
    end
    $display("sweep: protected %0d, unprotected %0d (T_RED shorter than detection: %0d)",
             n_prot, n_unprot, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
