// secret_controller -- the SECRET security controller.
//
// It holds the two SECRET parameters in clocks: T_RED, the time shift of
// the operating core behind the observation core, and T_SUSP, how long the
// operating core is stopped after a detection. Both reset to their design
// values (T_RED_BUS and T_SUSP_BUS bus cycles of BUS_CYCLE clocks) and can
// be rewritten at run time through cfg_we_i, as can the enable of the
// input filter (isolation of identified triggers in the pass switches).
//
// Suspension window. An alarm at clock A concerns inputs the observation
// core received shortly before A; the operating core receives them
// T_RED clocks later. Every alarm is therefore pushed into a shift
// register and the suspension starts when it has aged
// T_RED - T_SUSP + T_LEAD clocks (at once if that is not positive); it
// lasts T_SUSP clocks, and a later alarm restarts it. The clock gate is
// thus closed for the delayed images of live clocks
// A - (T_SUSP - T_LEAD) + 1 ... A + T_LEAD, i.e. the inputs from up to
// T_SUSP - T_LEAD clocks before the detection, where the trigger is, and
// T_LEAD clocks after it. T_LEAD is one bus cycle by default.
// suspend_o (registered) drives the clock gate; security_emulate_o is the
// same flag for the system; threat_o is high from an alarm until its
// suspension window has ended.
// The parameters, their values (4 and 2 bus cycles) and the suspend /
// Security_Emulate behaviour follow the document. Placing the window on
// the delayed stream instead of starting it at the detection instant is
// this design's choice: with T_SUSP < T_RED a window that starts at the
// detection would end before the delayed trigger arrives.
module secret_controller #(
  parameter int unsigned BUS_CYCLE  = 10,
  parameter int unsigned T_RED_BUS  = 4,
  parameter int unsigned T_SUSP_BUS = 2,
  parameter int unsigned T_LEAD_BUS = 1,
  parameter int unsigned DEPTH      = 128
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic                   alarm_i,
  input  logic                   cfg_we_i,
  input  logic [$clog2(DEPTH):0] cfg_t_red_i,
  input  logic [$clog2(DEPTH):0] cfg_t_susp_i,
  input  logic                   cfg_filter_en_i,
  output logic [$clog2(DEPTH):0] t_red_o,
  output logic [$clog2(DEPTH):0] t_susp_o,
  output logic                   filter_en_o,
  output logic                   suspend_o,
  output logic                   security_emulate_o,
  output logic                   threat_o
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned T_LEAD = T_LEAD_BUS * BUS_CYCLE;

  logic [DEPTH:1] hist;      // hist[i]: alarm i clocks ago
  logic [AW:0]    offset;
  logic [AW:0]    cnt;
  logic           start, pending;

  always_comb begin
    int off;
    off = int'(t_red_o) - int'(t_susp_o) + int'(T_LEAD);
    if (off < 0) off = 0;
    if (off > int'(DEPTH)) off = int'(DEPTH);
    offset = (AW+1)'(off);
  end

  always_comb begin
    start   = (offset == '0) ? alarm_i : hist[offset];
    pending = 1'b0;
    for (int i = 1; i <= int'(DEPTH); i++)
      if ((AW+1)'(i) < offset && hist[i]) pending = 1'b1;
    if (offset != '0 && alarm_i) pending = 1'b1;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      t_red_o     <= (AW+1)'(T_RED_BUS * BUS_CYCLE);
      t_susp_o    <= (AW+1)'(T_SUSP_BUS * BUS_CYCLE);
      filter_en_o <= 1'b1;
      hist        <= '0;
      cnt         <= '0;
    end else begin
      if (cfg_we_i) begin
        t_red_o     <= cfg_t_red_i;
        t_susp_o    <= cfg_t_susp_i;
        filter_en_o <= cfg_filter_en_i;
      end
      hist <= {hist[DEPTH-1:1], alarm_i};
      if (start)          cnt <= t_susp_o;
      else if (cnt != '0) cnt <= cnt - (AW+1)'(1);
    end
  end

  assign suspend_o          = (cnt != '0);
  assign security_emulate_o = suspend_o;
  assign threat_o           = pending || start || suspend_o;

endmodule
