// tb_avs_aes_core -- drives the AES core through its bus as a host would:
// writes key and data, starts encryption and decryption with the control
// word, checks the results against FIPS-197 / SP 800-38A vectors, the
// interrupt, the wait request during a running operation, the bus-cycle
// length (NR = 10 clocks), the read-back rules of the address map, and
// that the embedded Trojan opens the key space for exactly one bus cycle
// once both of its trigger conditions have been met, and not otherwise.
module tb_avs_aes_core;
  import avs_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [23:0] PAT = 24'h5AC396;
  logic [4:0]  address;
  logic [31:0] writedata, readdata;
  logic        write, read, waitrequest, irq;

  avs_aes_core #(.KEY_BITS(128), .TROJAN(1'b1), .TRIGGER_PATTERN(PAT)) dut (
    .clk, .reset, .avs_s1_address(address), .avs_s1_writedata(writedata),
    .avs_s1_write(write), .avs_s1_read(read), .avs_s1_readdata(readdata),
    .avs_s1_waitrequest(waitrequest), .avs_s1_irq(irq));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    address = a; writedata = d; write = 1;
    @(negedge clk); write = 0;
  endtask

  task automatic rd(input logic [4:0] a, output logic [31:0] d);
    address = a; read = 1; #1;
    while (waitrequest) @(negedge clk);
    @(negedge clk);
    read = 0;
    d = readdata;
  endtask

  task automatic crypt(input logic [127:0] key, input logic [127:0] din,
                       input logic decrypt, input logic [127:0] exp, input logic first);
    logic [31:0] d;
    int cyc;
    for (int i = 0; i < 4; i++) wr(5'(i), key[127-32*i -: 32]);
    for (int i = 0; i < 4; i++) wr(5'(8+i), din[127-32*i -: 32]);
    // key_valid + irq enable + enc/dec; key_valid is newly set only the first time
    if (!first) wr(CTRL_ADDR, 32'h0);
    wr(CTRL_ADDR, 32'hC0 | (decrypt ? 32'h2 : 32'h1));
    cyc = 1;
    while (!irq) begin @(negedge clk); cyc++; end
    checks++;
    // expansion (40 clocks) + wait state + start clock + 10 rounds + capture
    if (cyc != 40 + 1 + 1 + 10 + 1) begin failures++; $display("FAIL latency %0d", cyc); end
    for (int i = 0; i < 4; i++) begin
      rd(5'(12+i), d);
      chk($sformatf("result word %0d", i), d, exp[127-32*i -: 32]);
    end
    rd(CTRL_ADDR, d);
    chk("ctrl after op", d, 32'hC0);
    chk("irq cleared", 32'(irq), 0);
  endtask

  logic [31:0] d;
  int cyc;
  initial begin
    address = 0; writedata = 0; write = 0; read = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    crypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0,
          128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    crypt(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1,
          128'h00112233445566778899aabbccddeeff, 0);
    crypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h6bc1bee22e409f96e93d7e117393172a, 0,
          128'h3ad77bb40d7a3660a89ecaf32466ef97, 0);
    // address-map read-back rules
    rd(5'd0, d);  chk("key space reads ctrl", d, 32'hC0);
    rd(5'd9, d);  chk("data space reads ctrl", d, 32'hC0);
    rd(5'd20, d); chk("reserved reads zero", d, 0);
    // wait request while running: start encryption of the same block, read at once
    wr(CTRL_ADDR, 32'hC1);
    address = 5'd12; read = 1; #1;
    checks++;
    if (!waitrequest) begin failures++; $display("FAIL no waitrequest while busy"); end
    cyc = 0;
    while (waitrequest) begin @(negedge clk); cyc++; end
    @(negedge clk);
    read = 0;
    checks++;
    if (cyc < 10) begin failures++; $display("FAIL waited only %0d clocks", cyc); end
    chk("result after wait", readdata, 32'h3ad77bb4);
    // only condition 2 (read and write together): no leak
    address = 5'd20; read = 1; write = 1; writedata = 32'h0; @(negedge clk); read = 0; write = 0;
    rd(5'd1, d); chk("no leak without condition 1", d, 32'hC0);
    // only condition 1 (pattern in reserved bits): no leak, control reads clean
    wr(CTRL_ADDR, {PAT, 8'hC0});
    rd(CTRL_ADDR, d); chk("reserved bits not stored", d, 32'hC0);
    rd(5'd1, d); chk("no leak without condition 2", d, 32'hC0);
    // both conditions: key space readable for one bus cycle (10 clocks)
    address = 5'd20; read = 1; write = 1; writedata = 0; @(negedge clk); read = 0; write = 0;
    rd(5'd1, d); chk("leak word 1", d, 32'h28aed2a6);
    rd(5'd3, d); chk("leak word 3", d, 32'h09cf4f3c);
    repeat (7) @(negedge clk);
    rd(5'd0, d); chk("leak word 0 at end of bus cycle", d, 32'h2b7e1516);
    rd(5'd0, d); chk("leak closed after one bus cycle", d, 32'hC0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
