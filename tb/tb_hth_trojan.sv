// tb_hth_trojan -- checks the Trojan's trigger and payload: neither
// condition alone fires it, both together open the payload from the next
// clock for exactly BUS_CYCLE clocks, and a later control write without
// the pattern disarms it.
module tb_hth_trojan;
  import avs_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam logic [23:0] PAT = 24'hA1B2C3;

  logic read = 0, write = 0, armed, payload;
  logic [4:0] address = 0;
  logic [31:0] writedata = 0;

  hth_trojan #(.TRIGGER_PATTERN(PAT), .BUS_CYCLE(12)) dut (.clk, .reset, .read, .write,
    .address, .writedata, .armed_o(armed), .payload_o(payload));

  initial begin
    #50000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b expected %b", what, got, exp); end
  endtask

  task automatic bus(input logic r, input logic w, input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); read = r; write = w; address = a; writedata = d;
    @(negedge clk); read = 0; write = 0;
  endtask

  int n;
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    bus(1, 1, 5'd20, 0);                         chk("cond 2 only", payload, 0);
    repeat (3) @(negedge clk);                   chk("cond 2 only later", payload, 0);
    bus(0, 1, CTRL_ADDR, {PAT ^ 24'h1, 8'h80});  chk("wrong pattern", armed, 0);
    bus(1, 1, 5'd20, 0);                         chk("wrong pattern no payload", payload, 0);
    bus(0, 1, 5'd30, {PAT, 8'h80});              chk("pattern at wrong address", armed, 0);
    bus(0, 1, CTRL_ADDR, {PAT, 8'hC1});          chk("cond 1 arms", armed, 1);
    repeat (4) @(negedge clk);                   chk("cond 1 only", payload, 0);
    // both: payload from the next clock for 12 clocks
    @(negedge clk); read = 1; write = 1; address = 5'd3;
    #1 chk("payload not in trigger clock", payload, 0);
    @(negedge clk); read = 0; write = 0;
    n = 0;
    while (payload && n < 100) begin n++; @(negedge clk); end
    checks++;
    if (n != 12) begin failures++; $display("FAIL payload lasted %0d clocks", n); end
    bus(0, 1, CTRL_ADDR, 32'h80);                chk("disarmed", armed, 0);
    bus(1, 1, 5'd3, 0);                          chk("disarmed no payload", payload, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
