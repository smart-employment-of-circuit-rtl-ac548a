// tb_delay_fifo -- pushes a counting sequence through the buffer and
// checks that the output is the input of exactly t_red clocks before, that
// it is zero until the buffer has filled that far, that the delay can be
// changed at run time (including 0 = bypass and the full depth), and that
// the scan port returns the entry of the requested age.
module tb_delay_fifo;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int DEPTH = 16;

  logic [15:0] din, dout, scan;
  logic [4:0]  t_red, age;
  logic        scan_valid;
  int unsigned n = 0;

  delay_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.clk, .reset, .in_i(din), .t_red_i(t_red),
    .out_o(dout), .scan_age_i(age), .scan_o(scan), .scan_valid_o(scan_valid));

  initial begin
    #50000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // din during clock n is 1000 + n
  assign din = 16'(1000 + n);
  always @(posedge clk) if (!reset) n <= n + 1;

  task automatic expect_delay(input int d, input int clocks);
    repeat (clocks) begin
      @(negedge clk);
      checks++;
      if (d == 0) begin
        if (dout !== din) begin failures++; $display("FAIL bypass %h %h", dout, din); end
      end else if (int'(n) < d) begin
        if (dout !== 0) begin failures++; $display("FAIL not empty at n=%0d", n); end
      end else if (dout !== 16'(1000 + n - d)) begin
        failures++; $display("FAIL delay %0d at n=%0d: %0d", d, n, dout);
      end
    end
  endtask

  initial begin
    t_red = 5; age = 1;
    repeat (2) @(negedge clk); reset = 0;
    expect_delay(5, 12);
    t_red = 9;      expect_delay(9, 20);
    t_red = 0;      expect_delay(0, 3);
    t_red = DEPTH;  expect_delay(DEPTH, 20);
    t_red = 1;      expect_delay(1, 3);
    for (int a = 1; a <= DEPTH; a++) begin
      age = 5'(a); #1;
      checks++;
      if (!scan_valid || scan !== 16'(1000 + n - a)) begin
        failures++; $display("FAIL scan age %0d: %0d", a, scan);
      end
    end
    age = 0; #1;
    checks++;
    if (scan_valid) begin failures++; $display("FAIL age 0 valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
