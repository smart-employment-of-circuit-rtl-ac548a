// tb_trigger_analyzer -- runs the analyser against a real time-shift
// buffer. A stream of legal requests with three abnormal ones planted
// (read+write together, a control write with reserved bits, a write to a
// result address) is pushed in; an alarm is raised and the test checks
// that exactly the planted requests are reported, each with the expected
// pattern and mask, that the walk takes t_red clocks, and that no alarm
// means no report.
module tb_trigger_analyzer;
  import avs_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int DEPTH = 32;

  avs_req_t din, scan, pat, mask;
  logic [5:0] t_red, age;
  logic scan_valid, alarm, store, busy;
  logic [38:0] dout_unused;

  delay_fifo #(.WIDTH(REQ_W), .DEPTH(DEPTH)) u_fifo (.clk, .reset, .in_i(din), .t_red_i(t_red),
    .out_o(dout_unused), .scan_age_i(age), .scan_o(scan), .scan_valid_o(scan_valid));
  trigger_analyzer #(.DEPTH(DEPTH)) dut (.clk, .reset, .alarm_i(alarm), .t_red_i(t_red),
    .scan_age_o(age), .scan_i(scan), .scan_valid_i(scan_valid), .store_o(store),
    .store_pat_o(pat), .store_mask_o(mask), .busy_o(busy));

  initial begin
    #50000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  avs_req_t got_pat[$], got_mask[$];
  always @(posedge clk) if (store && !reset) begin got_pat.push_back(pat); got_mask.push_back(mask); end

  task automatic push(input avs_req_t r);
    @(negedge clk); din = r;
  endtask

  int busy_clocks;
  always @(posedge clk) if (busy && !reset) busy_clocks++;

  avs_req_t exp_pat[3], exp_mask[3];
  initial begin
    din = '0; alarm = 0; t_red = 12; busy_clocks = 0;
    repeat (2) @(negedge clk); reset = 0;
    // old traffic beyond the window (not reported)
    push('{read: 1, write: 1, address: 5'd7, writedata: 32'h0});
    for (int i = 0; i < 14; i++) push('{read: i[0], write: !i[0], address: 5'(i % 12), writedata: 32'(i)});
    // window of 12 entries with three abnormal ones
    push('{read: 0, write: 1, address: 5'd8,  writedata: 32'h1234});
    push('{read: 0, write: 1, address: CTRL_ADDR, writedata: 32'h5AC396C0});
    push('{read: 1, write: 0, address: 5'd12, writedata: 32'h0});
    push('{read: 0, write: 1, address: 5'd14, writedata: 32'hFFFF});
    push('{read: 0, write: 1, address: CTRL_ADDR, writedata: 32'h000000C1});
    push('{read: 1, write: 1, address: 5'd20, writedata: 32'h0});
    push('{read: 1, write: 0, address: 5'd0,  writedata: 32'h0});
    for (int i = 0; i < 5; i++) push('0);
    @(negedge clk); alarm = 1; din = '0;
    @(negedge clk); alarm = 0;
    repeat (30) @(negedge clk);
    // newest first
    exp_pat[0] = '{read: 1, write: 1, address: 0, writedata: 0};
    exp_mask[0] = '{read: 1, write: 1, address: 0, writedata: 0};
    exp_pat[1] = '{read: 0, write: 1, address: 5'd14, writedata: 0};
    exp_mask[1] = '{read: 0, write: 1, address: 5'h1F, writedata: 0};
    exp_pat[2] = '{read: 0, write: 1, address: CTRL_ADDR, writedata: 32'h5AC396C0};
    exp_mask[2] = '{read: 0, write: 1, address: 5'h1F, writedata: 32'hFFFFFFFF};
    checks++;
    if (got_pat.size() != 3) begin failures++; $display("FAIL %0d reports", got_pat.size()); end
    for (int i = 0; i < 3 && i < got_pat.size(); i++) begin
      checks++;
      if (got_pat[i] !== exp_pat[i] || got_mask[i] !== exp_mask[i]) begin
        failures++; $display("FAIL report %0d: %h/%h", i, got_pat[i], got_mask[i]);
      end
    end
    checks++;
    if (busy_clocks != 12) begin failures++; $display("FAIL walk took %0d clocks", busy_clocks); end
    // no alarm: no report
    got_pat.delete();
    push('{read: 1, write: 1, address: 5'd3, writedata: 0});
    repeat (20) @(negedge clk);
    checks++;
    if (got_pat.size() != 0) begin failures++; $display("FAIL report without alarm"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
