// tb_secret_top_aes256 -- the SECRET-protected core with a 256-bit key,
// where the bus cycle is 14 clocks and T_RED therefore 56 clocks. It
// encrypts and decrypts the FIPS-197 Appendix C.3 example through the
// delayed operating core, checks the response delay, then runs the
// Trojan attack and checks that it is detected, the operating core is
// suspended, the trigger is identified and isolated, and no key word
// reaches the host.
module tb_secret_top_aes256;
  import avs_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int unsigned T_RED = 56;
  localparam logic [23:0]  PAT = 24'h5AC396;
  localparam logic [255:0] KEY = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;

  logic [4:0]  address = '0;
  logic [31:0] writedata = '0, readdata;
  logic        write = 1'b0, read = 1'b0, rvalid, waitreq, irq, threat, emulate, isolated;
  logic [2:0]  stored;

  secret_top #(.KEY_BITS(256)) dut (
    .clk, .reset,
    .avs_s1_address(address), .avs_s1_writedata(writedata), .avs_s1_write(write),
    .avs_s1_read(read), .avs_s1_readdata(readdata), .avs_s1_readdatavalid(rvalid),
    .avs_s1_waitrequest(waitreq), .avs_s1_irq(irq),
    .threat, .security_emulate(emulate), .isolated, .triggers_stored(stored),
    .cfg_we(1'b0), .cfg_t_red(8'd0), .cfg_t_susp(8'd0), .cfg_filter_en(1'b1));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_leak = 0, n_alarm = 0, n_susp = 0, n_isol = 0;
  logic emulate_q = 0;
  always @(posedge clk) if (!reset) begin
    if (rvalid) for (int i = 0; i < 8; i++) if (readdata == KEY[255-32*i -: 32]) n_leak++;
    if (dut.alarm) n_alarm++;
    if (emulate && !emulate_q) n_susp++;
    emulate_q <= emulate;
    if (isolated) n_isol++;
  end

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); address = a; writedata = d; write = 1; read = 0;
    @(negedge clk); write = 0;
  endtask

  task automatic rd_chk(input logic [4:0] a, input logic [31:0] exp);
    int t;
    @(negedge clk); address = a; read = 1; write = 0;
    @(negedge clk); read = 0;
    t = 1;
    while (!rvalid && t < T_RED + 20) begin @(negedge clk); t++; end
    checks++;
    if (!rvalid || readdata !== exp || t != T_RED + 1) begin
      failures++; $display("FAIL read %0d: valid %b data %h after %0d", a, rvalid, readdata, t);
    end
  endtask

  task automatic crypt(input logic [127:0] din, input logic dec, input logic [127:0] exp);
    for (int i = 0; i < 8; i++) wr(5'(i), KEY[255-32*i -: 32]);
    for (int i = 0; i < 4; i++) wr(5'(8+i), din[127-32*i -: 32]);
    wr(CTRL_ADDR, 32'h0);
    wr(CTRL_ADDR, 32'h80 | (dec ? 32'h2 : 32'h1));
    repeat (80) @(negedge clk);
    for (int i = 0; i < 4; i++) rd_chk(5'(12+i), exp[127-32*i -: 32]);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    reset = 0;
    crypt(128'h00112233445566778899aabbccddeeff, 0, 128'h8ea2b7ca516745bfeafc49904b496089);
    crypt(128'h8ea2b7ca516745bfeafc49904b496089, 1, 128'h00112233445566778899aabbccddeeff);
    checks++;
    if (n_alarm != 0) begin failures++; $display("FAIL false alarm"); end
    wr(CTRL_ADDR, {PAT, 8'h80});
    @(negedge clk); address = 5'd20; read = 1; write = 1;
    @(negedge clk); write = 0; address = 5'd5;
    @(negedge clk); read = 0;
    repeat (T_RED + 60) @(negedge clk);
    checks++;
    if (n_alarm == 0 || n_susp != 1 || n_isol == 0 || stored == 0) begin
      failures++; $display("FAIL attack handling: alarms %0d suspensions %0d isolated %0d stored %0d",
                           n_alarm, n_susp, n_isol, stored);
    end
    checks++;
    if (n_leak != 0 || dut.u_operating.g_trojan.u_hth.armed_o) begin
      failures++; $display("FAIL key leaked %0d / operating Trojan armed", n_leak);
    end
    crypt(128'h00112233445566778899aabbccddeeff, 0, 128'h8ea2b7ca516745bfeafc49904b496089);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
