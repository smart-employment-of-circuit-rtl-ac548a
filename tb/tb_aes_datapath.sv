// tb_aes_datapath -- encrypts and decrypts the FIPS-197 Appendix C.1
// example block (AES-128) and a second block whose ciphertext is taken
// from the AES-128 test vectors of SP 800-38A (ECB, key 2b7e...), and
// checks that each operation finishes NR = 10 clocks after its start clock.
module tb_aes_datapath;
  import aes_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   ke_start, ke_ready, start, dec, busy, done;
  word_t  key [8];
  logic [3:0] rk_idx;
  block_t rk, din, dout;

  aes_key_expansion #(.NK(4)) u_ke (.clk, .reset, .start_i(ke_start), .key_i(key),
    .rk_idx_i(rk_idx), .rk_o(rk), .ready_o(ke_ready));
  aes_datapath #(.NK(4)) dut (.clk, .reset, .start_i(start), .decrypt_i(dec),
    .block_i(din), .rk_i(rk), .rk_idx_o(rk_idx), .block_o(dout), .busy_o(busy), .done_o(done));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(input block_t k);
    key = '{k[127:96], k[95:64], k[63:32], k[31:0], 0, 0, 0, 0};
    @(negedge clk); ke_start = 1;
    @(negedge clk); ke_start = 0;
    while (!ke_ready) @(negedge clk);
  endtask

  task automatic run(input logic d, input block_t in, input block_t exp);
    int cyc;
    din = in; dec = d; start = 1;
    @(negedge clk); start = 0; cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (dout !== exp) begin failures++; $display("FAIL dec=%0d got %h expected %h", d, dout, exp); end
    checks++;
    if (cyc != 10) begin failures++; $display("FAIL took %0d clocks, expected 10", cyc); end
    @(negedge clk);
  endtask

  initial begin
    ke_start = 0; start = 0; dec = 0; din = '0;
    repeat (3) @(posedge clk);
    reset = 0;
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    run(0, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff);
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    run(0, 128'h6bc1bee22e409f96e93d7e117393172a, 128'h3ad77bb40d7a3660a89ecaf32466ef97);
    run(1, 128'h3ad77bb40d7a3660a89ecaf32466ef97, 128'h6bc1bee22e409f96e93d7e117393172a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
