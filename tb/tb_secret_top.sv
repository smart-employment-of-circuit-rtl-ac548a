// tb_secret_top -- end-to-end test of the SECRET-protected AES core.
//
// A host model drives the live bus; the expected responses of the
// operating core are worked out here from FIPS-197 / SP 800-38A vectors
// and from the fixed delay T_RED + 1. The scenario:
//   1. normal use: key, data, encrypt, read the result; every response
//      arrives exactly T_RED + 1 clocks after its read, none is lost;
//   2. attack: the host writes the Trojan's pattern into the control
//      word, asserts read and write together, then reads the key space.
//      The observation core leaks the key, the detector raises the alarm,
//      the analyser identifies the trigger requests, the operating core is
//      suspended over the delayed trigger (Security_Emulate) and the
//      delayed trigger is isolated; no key word ever reaches the host;
//   3. normal use again: a decryption returns the right plaintext;
//   4. repeated attack: the stored triggers are isolated on the delayed
//      path again and the key still does not leak;
//   4b. the same attack with isolation switched off: suspension alone
//      keeps the trigger from the operating core;
//   5. run-time retuning of T_RED: responses follow the new delay.
// Each mechanism (detection, suspension, trigger identification,
// isolation, retuning, wait request) is counted and must occur.
// The test runs the top at its default parameters.
module tb_secret_top;
  import avs_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int unsigned T_RED   = 40;   // 4 bus cycles of 10 clocks (AES-128)
  localparam logic [23:0] PAT     = 24'h5AC396;
  localparam logic [127:0] KEY    = 128'h2b7e151628aed2a6abf7158809cf4f3c;

  logic [4:0]  address = '0;
  logic [31:0] writedata = '0, readdata;
  logic        write = 1'b0, read = 1'b0, rvalid, waitreq, irq;
  logic        threat, emulate, isolated;
  logic [2:0]  stored;
  logic        cfg_we = 1'b0, cfg_filter_en = 1'b1;
  logic [7:0]  cfg_t_red = '0, cfg_t_susp = '0;

  secret_top dut (
    .clk, .reset,
    .avs_s1_address(address), .avs_s1_writedata(writedata), .avs_s1_write(write),
    .avs_s1_read(read), .avs_s1_readdata(readdata), .avs_s1_readdatavalid(rvalid),
    .avs_s1_waitrequest(waitreq), .avs_s1_irq(irq),
    .threat, .security_emulate(emulate), .isolated, .triggers_stored(stored),
    .cfg_we, .cfg_t_red, .cfg_t_susp, .cfg_filter_en);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- response bookkeeping: every read issued at clock c is expected at c + delay + 1
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int unsigned issue_q[$];
  int unsigned cur_delay = T_RED;
  int unsigned resp_cnt = 0, late = 0;
  logic [31:0] resp_q[$];
  logic [31:0] key_words[4] = '{KEY[127:96], KEY[95:64], KEY[63:32], KEY[31:0]};
  int n_leak = 0, n_alarm = 0, n_susp = 0, n_isol = 0, n_wait = 0;
  logic emulate_q = 0;

  always @(posedge clk) if (!reset) begin
    if (rvalid) begin
      resp_q.push_back(readdata);
      resp_cnt++;
      for (int i = 0; i < 4; i++) if (readdata == key_words[i]) n_leak++;
    end
    if (dut.alarm) n_alarm++;
    if (emulate && !emulate_q) n_susp++;
    emulate_q <= emulate;
    if (isolated) n_isol++;
    if (waitreq && dut.req_op.read) n_wait++;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); address = a; writedata = d; write = 1; read = 0;
    @(negedge clk); write = 0;
  endtask

  // a read whose response must arrive exactly cur_delay + 1 clocks later
  task automatic rd(input logic [4:0] a, output logic [31:0] d);
    int unsigned t0, n0;
    @(negedge clk); address = a; read = 1; write = 0;
    t0 = cyc; n0 = resp_cnt;
    @(negedge clk); read = 0;
    while (resp_cnt == n0 && cyc < t0 + cur_delay + 20) @(negedge clk);
    checks++;
    if (resp_cnt == n0) begin failures++; d = 'x; $display("FAIL read %0d: no response", a); end
    else begin
      d = resp_q.pop_back();
      if (cyc - t0 != cur_delay + 2) begin
        failures++; $display("FAIL read %0d: response after %0d clocks", a, cyc - t0);
      end
    end
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic crypt(input logic [127:0] din, input logic dec, input logic [127:0] exp);
    logic [31:0] d;
    for (int i = 0; i < 4; i++) wr(5'(i), KEY[127-32*i -: 32]);
    for (int i = 0; i < 4; i++) wr(5'(8+i), din[127-32*i -: 32]);
    wr(CTRL_ADDR, 32'h0);
    wr(CTRL_ADDR, 32'hC0 | (dec ? 32'h2 : 32'h1));
    idle(60);
    for (int i = 0; i < 4; i++) begin
      rd(5'(12+i), d);
      chk($sformatf("%s word %0d", dec ? "plaintext" : "ciphertext", i), d, exp[127-32*i -: 32]);
    end
  endtask

  task automatic attack(output logic [31:0] leaked);
    wr(CTRL_ADDR, {PAT, 8'hC0});                 // trigger condition 1
    @(negedge clk); address = 5'd20; read = 1; write = 1; writedata = '0;  // condition 2
    @(negedge clk); read = 0; write = 0;
    @(negedge clk); address = 5'd0; read = 1;   // try to read the key (payload)
    @(negedge clk); read = 0;
    leaked = '0;
    idle(T_RED + 60);
  endtask

  logic [31:0] d;
  int wait_seen_before;
  initial begin
    repeat (4) @(negedge clk);
    reset = 0;
    // 1. normal operation
    crypt(128'h6bc1bee22e409f96e93d7e117393172a, 0, 128'h3ad77bb40d7a3660a89ecaf32466ef97);
    rd(5'd2, d); chk("key space reads control word", d, 32'hC0);
    checks++;
    if (n_alarm != 0 || n_susp != 0) begin failures++; $display("FAIL false alarm"); end
    // 2. attack
    attack(d);
    checks++;
    if (n_alarm == 0) begin failures++; $display("FAIL Trojan payload not detected"); end
    checks++;
    if (n_susp != 1) begin failures++; $display("FAIL suspensions: %0d", n_susp); end
    checks++;
    if (stored == 0) begin failures++; $display("FAIL no trigger identified"); end
    checks++;
    if (n_isol == 0) begin failures++; $display("FAIL delayed trigger not isolated"); end
    checks++;
    if (dut.u_operating.g_trojan.u_hth.payload_o || dut.u_operating.g_trojan.u_hth.armed_o) begin
      failures++; $display("FAIL operating core Trojan reached");
    end
    // 3. normal operation continues (the control word must be rewritten cleanly)
    crypt(128'h3ad77bb40d7a3660a89ecaf32466ef97, 1, 128'h6bc1bee22e409f96e93d7e117393172a);
    // 4. repeated attack: stored triggers are isolated again
    begin
      int isol_before;
      isol_before = n_isol;
      attack(d);
      checks++;
      if (n_isol <= isol_before) begin failures++; $display("FAIL repeated trigger not isolated"); end
    end
    // 4b. isolation switched off: suspension alone must keep the trigger out
    @(negedge clk); cfg_we = 1; cfg_t_red = 40; cfg_t_susp = 20; cfg_filter_en = 0;
    @(negedge clk); cfg_we = 0;
    begin
      int isol_before, susp_before;
      isol_before = n_isol; susp_before = n_susp;
      attack(d);
      checks++;
      if (n_susp != susp_before + 1 || n_isol != isol_before) begin
        failures++; $display("FAIL filter-off attack: suspensions %0d isolations %0d",
                             n_susp - susp_before, n_isol - isol_before);
      end
      checks++;
      if (dut.u_operating.g_trojan.u_hth.payload_o || dut.u_operating.g_trojan.u_hth.armed_o) begin
        failures++; $display("FAIL operating core Trojan reached with filter off");
      end
    end
    // 5. retune T_RED to 2 bus cycles (T_SUSP stays 2), filter on, check the new delay
    @(negedge clk); cfg_we = 1; cfg_t_red = 20; cfg_t_susp = 20; cfg_filter_en = 1;
    @(negedge clk); cfg_we = 0;
    idle(50);
    cur_delay = 20;
    crypt(128'h6bc1bee22e409f96e93d7e117393172a, 0, 128'h3ad77bb40d7a3660a89ecaf32466ef97);
    // wait request: read the result at once after starting an operation
    wait_seen_before = n_wait;
    wr(CTRL_ADDR, 32'hC1);
    @(negedge clk); address = 5'd12; read = 1;
    @(negedge clk); read = 0;
    idle(40);
    checks++;
    if (n_wait == wait_seen_before) begin failures++; $display("FAIL no wait request seen"); end
    // summary of mechanisms
    checks++;
    if (n_leak != 0) begin failures++; $display("FAIL key leaked to the host %0d times", n_leak); end
    $display("mechanisms: alarms=%0d suspensions=%0d isolated=%0d stored=%0d waits=%0d leaks=%0d",
             n_alarm, n_susp, n_isol, stored, n_wait, n_leak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
