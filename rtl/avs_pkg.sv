// avs_pkg -- the memory-mapped bus of the protected AES core and its address
// map, shared by the core, the SECRET wrapper and the run-time monitor.
//
// The core is a 32-word x 32-bit slave with a 5-bit word address:
//   0-7   key space, write-only (4, 6 or 8 words used, by key size)
//   8-11  input data space, write-only
//   12-15 result space, read-only
//   16-30 reserved, reads as zero
//   31    control word: four used bits, the rest reserved
// The bit positions of the four control bits (0, 1, 6, 7) follow the
// layout drawn for the core; which function sits on which of them is this
// design's choice: 0 = enc, 1 = dec, 6 = irq enable, 7 = key_valid.
// One bus request (read select, write select, address, write data) travels
// as avs_req_t through the time-shift buffer and the pass switches.
package avs_pkg;

  localparam int unsigned ADDR_W = 5;
  localparam int unsigned DATA_W = 32;

  typedef struct packed {
    logic              read;
    logic              write;
    logic [ADDR_W-1:0] address;
    logic [DATA_W-1:0] writedata;
  } avs_req_t;

  localparam int unsigned REQ_W = $bits(avs_req_t);

  localparam logic [ADDR_W-1:0] KEY_BASE    = 5'd0;
  localparam logic [ADDR_W-1:0] DATA_BASE   = 5'd8;
  localparam logic [ADDR_W-1:0] RESULT_BASE = 5'd12;
  localparam logic [ADDR_W-1:0] RSV_BASE    = 5'd16;
  localparam logic [ADDR_W-1:0] CTRL_ADDR   = 5'd31;

  localparam int unsigned CTRL_ENC       = 0;
  localparam int unsigned CTRL_DEC       = 1;
  localparam int unsigned CTRL_IRQ_EN    = 6;
  localparam int unsigned CTRL_KEY_VALID = 7;
  localparam logic [DATA_W-1:0] CTRL_USED_MASK = 32'h0000_00C3;

  function automatic logic is_key(input logic [ADDR_W-1:0] a);
    return a < DATA_BASE;
  endfunction

  function automatic logic is_write_only(input logic [ADDR_W-1:0] a);
    return a < RESULT_BASE;
  endfunction

  function automatic logic is_result(input logic [ADDR_W-1:0] a);
    return a >= RESULT_BASE && a < RSV_BASE;
  endfunction

  function automatic logic is_reserved(input logic [ADDR_W-1:0] a);
    return a >= RSV_BASE && a != CTRL_ADDR;
  endfunction

endpackage
