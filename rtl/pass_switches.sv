// pass_switches -- the pass logic between the time-shift buffer and the
// operating core.
//
// A delayed request passes unchanged unless isolation is enabled by the
// security controller (filter_en_i) and the identified-triggers memory
// reports a match, in which case its read and write selects are cleared so
// the operating core never sees the transaction; isolated_o marks that
// clock. Purely combinational. Isolating matched inputs under controller
// control follows the document; dropping the selects (rather than, say,
// replacing the data) is this design's choice.
module pass_switches
  import avs_pkg::*;
(
  input  avs_req_t req_i,
  input  logic     filter_en_i,
  input  logic     match_i,
  output avs_req_t req_o,
  output logic     isolated_o
);
  always_comb begin
    isolated_o = filter_en_i && match_i && (req_i.read || req_i.write);
    req_o      = req_i;
    if (isolated_o) begin
      req_o.read  = 1'b0;
      req_o.write = 1'b0;
    end
  end
endmodule
