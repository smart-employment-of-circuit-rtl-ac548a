// tb_trigger_memory -- stores masked patterns and checks the parallel
// compare: exact and masked matches, idle probes never match, duplicates
// take no slot, and the oldest entry is replaced when the memory is full.
module tb_trigger_memory;
  import avs_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic store = 0, match;
  avs_req_t pat = '0, mask = '0, probe = '0;
  logic [1:0] count;

  trigger_memory #(.ENTRIES(3)) dut (.clk, .reset, .store_i(store), .pat_i(pat), .mask_i(mask),
    .probe_i(probe), .match_o(match), .count_o(count));

  initial begin
    #50000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic put(input avs_req_t p, input avs_req_t m);
    @(negedge clk); store = 1; pat = p; mask = m;
    @(negedge clk); store = 0;
  endtask

  task automatic probe_chk(input string what, input avs_req_t p, input logic exp);
    probe = p; #1;
    checks++;
    if (match !== exp) begin failures++; $display("FAIL %s: match %b", what, match); end
  endtask

  localparam avs_req_t RW   = '{read: 1, write: 1, address: 0, writedata: 0};
  localparam avs_req_t CW   = '{read: 0, write: 1, address: 5'd31, writedata: 32'h5AC396C0};
  localparam avs_req_t CWM  = '{read: 0, write: 1, address: 5'h1F, writedata: 32'hFFFFFFFF};
  localparam avs_req_t W14  = '{read: 0, write: 1, address: 5'd14, writedata: 0};
  localparam avs_req_t AWM  = '{read: 0, write: 1, address: 5'h1F, writedata: 0};
  localparam avs_req_t W20  = '{read: 0, write: 1, address: 5'd20, writedata: 0};

  initial begin
    repeat (2) @(negedge clk); reset = 0;
    probe_chk("empty", RW, 0);
    put(RW, RW);
    probe_chk("rw any address", '{read: 1, write: 1, address: 5'd9, writedata: 32'h77}, 1);
    probe_chk("read alone", '{read: 1, write: 0, address: 5'd9, writedata: 32'h77}, 0);
    put(CW, CWM);
    probe_chk("exact control write", CW, 1);
    probe_chk("control write other data", '{read: 0, write: 1, address: 5'd31, writedata: 32'hC0}, 0);
    probe_chk("idle bus", '0, 0);
    put(CW, CWM);
    checks++; if (count != 2) begin failures++; $display("FAIL duplicate stored, count %0d", count); end
    put(W14, AWM);
    probe_chk("write result any data", '{read: 0, write: 1, address: 5'd14, writedata: 32'h1}, 1);
    probe_chk("read result", '{read: 1, write: 0, address: 5'd14, writedata: 32'h1}, 0);
    checks++; if (count != 3) begin failures++; $display("FAIL count %0d", count); end
    put(W20, AWM);   // replaces the oldest (RW)
    probe_chk("new entry", '{read: 0, write: 1, address: 5'd20, writedata: 32'h5}, 1);
    probe_chk("oldest replaced", '{read: 1, write: 1, address: 5'd9, writedata: 32'h77}, 0);
    probe_chk("others kept", CW, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
