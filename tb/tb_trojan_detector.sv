// tb_trojan_detector -- feeds the monitor bus traffic and read responses
// by hand: legal responses must pass silently, and each kind of illegal
// response (key word returned, reserved bits set in a control-word read,
// non-zero reserved read) must raise the alarm in the response clock with
// the right violation bit. Responses to reads that were held off by wait
// request are not checked.
module tb_trojan_detector;
  import avs_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  avs_req_t req = '0;
  logic wait_r = 0;
  logic [31:0] rdata = 0;
  logic alarm;
  logic [2:0] viol;

  trojan_detector #(.NK(4)) dut (.clk, .reset, .req_i(req), .waitrequest_i(wait_r),
    .readdata_i(rdata), .alarm_o(alarm), .viol_o(viol));

  initial begin
    #50000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); req = '{read: 0, write: 1, address: a, writedata: d};
    @(negedge clk); req = '0;
  endtask

  // read address a; the response data d appears in the following clock
  task automatic rd(input logic [4:0] a, input logic [31:0] d, input logic [2:0] exp,
                    input logic held = 0);
    @(negedge clk); req = '{read: 1, write: 0, address: a, writedata: 0}; wait_r = held;
    @(negedge clk); req = '0; wait_r = 0; rdata = d; #1;
    checks++;
    if (viol !== exp || alarm !== (exp != 0)) begin
      failures++; $display("FAIL read %0d data %h: viol %b expected %b", a, d, viol, exp);
    end
    @(negedge clk); rdata = 0; #1;
    checks++;
    if (alarm) begin failures++; $display("FAIL alarm outside response clock"); end
  endtask

  initial begin
    repeat (2) @(negedge clk); reset = 0;
    wr(0, 32'h11112222); wr(1, 32'h33334444); wr(2, 32'h55556666); wr(3, 32'h77778888);
    rd(5'd0,  32'h000000C0, 3'b000);   // write-only space returns the control word
    rd(5'd12, 32'hDEADBEEF, 3'b000);   // ordinary result
    rd(5'd20, 32'h00000000, 3'b000);   // reserved reads zero
    rd(CTRL_ADDR, 32'h00000081, 3'b000);
    rd(5'd1,  32'h33334444, 3'b011);   // key leak through the key space
    rd(5'd13, 32'h77778888, 3'b001);   // key word on a result read
    rd(5'd9,  32'h00010000, 3'b010);   // reserved bits on a write-only read
    rd(CTRL_ADDR, 32'h5A000080, 3'b010);
    rd(5'd25, 32'h00000001, 3'b100);   // non-zero reserved read
    rd(5'd25, 32'h11112222, 3'b101);
    rd(5'd1,  32'h33334444, 3'b000, 1); // held off by wait request: not a response
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
