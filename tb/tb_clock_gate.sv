// tb_clock_gate -- counts the edges that pass the gate: with the enable
// changed right after rising edges, every clock whose rising edge sees the
// enable high passes one whole pulse and the others pass none, and the
// gated clock is never high while the input clock is low.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b1, gclk;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  clock_gate dut (.clk_i(clk), .en_i(en), .clk_o(gclk));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int gated_edges = 0, expected = 0;
  always @(posedge gclk) gated_edges++;
  always @(posedge clk) if (en) expected++;
  always @(gclk) if (gclk && !clk) begin failures++; $display("FAIL glitch"); end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1 en = 1'($urandom);
    end
    @(negedge clk);
    checks++;
    if (gated_edges != expected || expected == 0 || expected == 200) begin
      failures++; $display("FAIL %0d gated edges, expected %0d", gated_edges, expected);
    end
    checks++;
    // high-phase length: a pulse that passes is a whole pulse
    en = 1; @(posedge gclk); #1 en = 0; #3;
    if (!gclk) begin failures++; $display("FAIL pulse cut short"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
