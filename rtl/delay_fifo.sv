// delay_fifo -- the time-shift buffer between the observation and the
// operating core.
//
// Every clock one WIDTH-bit entry (a bus request, idle or not) is written
// into a circular buffer of DEPTH entries; out_o is the entry written
// t_red_i clocks earlier, so the operating core sees the bus exactly T_RED
// clocks after the observation core. t_red_i may change at run time
// (1..DEPTH; 0 passes in_i straight through). Until t_red_i entries have
// been written since reset, out_o is all zeros (an idle request), so the
// buffer itself needs no reset. A second read port returns the entry of a
// given age (1 = written in the last clock) for the trigger analyser.
// Assertions check that the tap and the scan age stay within the buffer.
// A controllable FIFO follows the document; the circular buffer with a
// movable read tap, and its depth, are this design's choices.
module delay_fifo #(
  parameter int unsigned WIDTH = 39,
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic [WIDTH-1:0]         in_i,
  input  logic [$clog2(DEPTH):0]   t_red_i,
  output logic [WIDTH-1:0]         out_o,
  input  logic [$clog2(DEPTH):0]   scan_age_i,
  output logic [WIDTH-1:0]         scan_o,
  output logic                     scan_valid_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr;
  logic [AW:0]      filled;

  always_ff @(posedge clk) mem[wptr] <= in_i;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      wptr   <= '0;
      filled <= '0;
    end else begin
      wptr <= wptr + AW'(1);
      if (filled != (AW+1)'(DEPTH)) filled <= filled + (AW+1)'(1);
    end
  end

  always_comb begin
    if (t_red_i == '0)          out_o = in_i;
    else if (filled >= t_red_i) out_o = mem[wptr - AW'(t_red_i)];
    else                        out_o = '0;
  end

  // the tap and the scan port must stay inside the buffer
  a_t_red_range: assert property (@(posedge clk) disable iff (reset) t_red_i <= (AW+1)'(DEPTH));
  a_scan_range:  assert property (@(posedge clk) disable iff (reset) scan_age_i <= (AW+1)'(DEPTH));

  assign scan_valid_o = (scan_age_i != '0) && (filled >= scan_age_i);
  assign scan_o       = mem[wptr - AW'(scan_age_i)];

endmodule
