// trigger_memory -- the identified-triggers memory.
//
// Holds up to ENTRIES (pattern, mask) pairs written by the trigger
// analyser. A store that equals a held pair is dropped; otherwise it goes
// to the next slot in round-robin order, replacing the oldest once full.
// Every clock the probe (the delayed request about to reach the operating
// core) is compared with all held pairs in parallel; match_o is high, in
// the same clock, when the probe is a bus transaction (read or write) and
// agrees with some pattern on every bit its mask selects.
// Storing identified inputs and comparing all later inputs with them
// follows the document; the size and the masked compare are this design's.
module trigger_memory
  import avs_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  logic                         clk,
  input  logic                         reset,
  input  logic                         store_i,
  input  avs_req_t                     pat_i,
  input  avs_req_t                     mask_i,
  input  avs_req_t                     probe_i,
  output logic                         match_o,
  output logic [$clog2(ENTRIES+1)-1:0] count_o
);
  localparam int unsigned PW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  avs_req_t         pat  [ENTRIES];
  avs_req_t         mask [ENTRIES];
  logic [ENTRIES-1:0] valid;
  logic [PW-1:0]    wptr;

  logic dup;
  always_comb begin
    dup = 1'b0;
    for (int i = 0; i < int'(ENTRIES); i++)
      if (valid[i] && pat[i] == pat_i && mask[i] == mask_i) dup = 1'b1;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      valid <= '0;
      wptr  <= '0;
      for (int i = 0; i < int'(ENTRIES); i++) begin
        pat[i]  <= '0;
        mask[i] <= '0;
      end
    end else if (store_i && !dup) begin
      pat[wptr]   <= pat_i;
      mask[wptr]  <= mask_i;
      valid[wptr] <= 1'b1;
      wptr <= (wptr == PW'(ENTRIES - 1)) ? '0 : wptr + PW'(1);
    end
  end

  always_comb begin
    match_o = 1'b0;
    if (probe_i.read || probe_i.write)
      for (int i = 0; i < int'(ENTRIES); i++)
        if (valid[i] && ((probe_i ^ pat[i]) & mask[i]) == '0) match_o = 1'b1;
  end

  // an entry is only ever written at the round-robin pointer
  a_wptr_range: assert property (@(posedge clk) disable iff (reset) wptr <= PW'(ENTRIES - 1));

  always_comb begin
    count_o = '0;
    for (int i = 0; i < int'(ENTRIES); i++) count_o += valid[i];
  end

endmodule
