// trigger_analyzer -- buffered-input analysis and trigger identification.
//
// When the detector raises an alarm, the analyser walks through the
// requests still waiting in the time-shift buffer, newest first, and looks
// for transactions a correct host never issues:
//   R1 read and write selects asserted together;
//   R2 a write to the control word with any reserved bit set;
//   R3 a write to the read-only result space or to reserved space.
// Each one found is handed to the identified-triggers memory as a
// (pattern, mask) pair: R1 matches any request with both selects, R2 the
// exact control write, R3 any write to that address.
// Because the buffer advances one entry per clock, reading age 1+2k in
// step k visits the entries as they stood at the alarm, one per clock; the
// walk covers the t_red_i entries not yet delivered (needs DEPTH >= 2*T_RED)
// and takes t_red_i clocks. Alarms during a walk are ignored. store_o is
// registered. That the analyser searches the buffer on an alarm and stores
// abnormal inputs follows the document; the rules and the walk are this
// design's choices.
module trigger_analyzer
  import avs_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic                   alarm_i,
  input  logic [$clog2(DEPTH):0] t_red_i,
  output logic [$clog2(DEPTH):0] scan_age_o,
  input  avs_req_t               scan_i,
  input  logic                   scan_valid_i,
  output logic                   store_o,
  output avs_req_t               store_pat_o,
  output avs_req_t               store_mask_o,
  output logic                   busy_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW:0] k;      // step of the walk
  logic [AW:0] limit;  // entries to visit

  assign scan_age_o = (AW+1)'(2) * k + (AW+1)'(1);

  logic     hit;
  avs_req_t pat, mask;
  always_comb begin
    hit  = 1'b0;
    pat  = '0;
    mask = '0;
    if (busy_o && scan_valid_i) begin
      if (scan_i.read && scan_i.write) begin
        hit = 1'b1;
        pat.read = 1'b1;  pat.write = 1'b1;
        mask.read = 1'b1; mask.write = 1'b1;
      end else if (scan_i.write && scan_i.address == CTRL_ADDR &&
                   (scan_i.writedata & ~CTRL_USED_MASK) != '0) begin
        hit  = 1'b1;
        pat  = scan_i;
        mask = '1;
        mask.read = 1'b0;
      end else if (scan_i.write && (is_result(scan_i.address) || is_reserved(scan_i.address))) begin
        hit = 1'b1;
        pat.write = 1'b1;    pat.address = scan_i.address;
        mask.write = 1'b1;   mask.address = '1;
      end
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      busy_o       <= 1'b0;
      k            <= '0;
      limit        <= '0;
      store_o      <= 1'b0;
      store_pat_o  <= '0;
      store_mask_o <= '0;
    end else begin
      store_o      <= hit;
      store_pat_o  <= pat;
      store_mask_o <= mask;
      if (!busy_o) begin
        k <= '0;
        if (alarm_i && t_red_i != '0) begin
          busy_o <= 1'b1;
          limit  <= (t_red_i > (AW+1)'(DEPTH / 2)) ? (AW+1)'(DEPTH / 2) : t_red_i;
        end
      end else if (k + (AW+1)'(1) >= limit) begin
        busy_o <= 1'b0;
      end else begin
        k <= k + (AW+1)'(1);
      end
    end
  end

endmodule
