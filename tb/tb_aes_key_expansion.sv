// tb_aes_key_expansion -- checks the key schedule against the worked
// examples of FIPS-197 Appendix A for a 128-bit and a 256-bit key, and the
// number of clocks the expansion takes (one word per clock).
module tb_aes_key_expansion;
  import aes_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   st4, st8, rdy4, rdy8;
  word_t  key4 [8], key8 [8];
  logic [3:0] idx4, idx8;
  block_t rk4, rk8;

  aes_key_expansion #(.NK(4)) dut4 (.clk, .reset, .start_i(st4), .key_i(key4),
    .rk_idx_i(idx4), .rk_o(rk4), .ready_o(rdy4));
  aes_key_expansion #(.NK(8)) dut8 (.clk, .reset, .start_i(st8), .key_i(key8),
    .rk_idx_i(idx8), .rk_o(rk8), .ready_o(rdy8));

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc;
  initial begin
    st4 = 0; st8 = 0; idx4 = 0; idx8 = 0;
    key4 = '{32'h2b7e1516, 32'h28aed2a6, 32'habf71588, 32'h09cf4f3c, 0, 0, 0, 0};
    key8 = '{32'h603deb10, 32'h15ca71be, 32'h2b73aef0, 32'h857d7781,
             32'h1f352c07, 32'h3b6108d7, 32'h2d9810a3, 32'h0914dff4};
    repeat (3) @(posedge clk);
    reset = 0;
    @(negedge clk); st4 = 1; st8 = 1;
    @(negedge clk); st4 = 0; st8 = 0;
    cyc = 1;
    while (!rdy4) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 44 - 4 + 1) begin failures++; $display("FAIL NK=4 took %0d clocks", cyc); end
    idx4 = 0;  #1 check("rk0",  rk4, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    idx4 = 1;  #1 check("rk1",  rk4, 128'ha0fafe1788542cb123a339392a6c7605);
    idx4 = 5;  #1 check("rk5",  rk4, 128'hd4d1c6f87c839d87caf2b8bc11f915bc);
    idx4 = 10; #1 check("rk10", rk4, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    while (!rdy8) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 60 - 8 + 1) begin failures++; $display("FAIL NK=8 took %0d clocks", cyc); end
    idx8 = 0;  #1 check("256 rk0",  rk8, 128'h603deb1015ca71be2b73aef0857d7781);
    idx8 = 2;  #1 check("256 rk2",  rk8, 128'h9ba354118e6925afa51a8b5f2067fcde);
    idx8 = 14; #1 check("256 rk14", rk8, 128'hfe4890d1e6188d0b046df344706c631e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
