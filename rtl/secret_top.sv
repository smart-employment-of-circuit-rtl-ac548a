// secret_top -- SECRET protection of a third-party AES core that carries a
// hardware Trojan.
//
// Two identical copies of the core run the same bus traffic. The
// redundant observation core gets the host's requests at once and is
// watched by the run-time Trojan detector; its outputs go nowhere else.
// The operating core gets the same requests T_RED clocks later, through the
// time-shift buffer and the pass switches, and drives the host's read
// data and interrupt. When the detector sees the Trojan's payload on the
// observation core, the controller stops the operating core's clock (AND
// clock gate) for T_SUSP clocks around the delayed image of the trigger,
// so the operating core never receives it; meanwhile the trigger analyser
// searches the buffer for the abnormal requests and stores them, and the
// pass switches drop every later request that matches one.
//
// Host interface: an Avalon-style slave with the core's address map (see
// avs_pkg). Every response comes T_RED clocks (4 bus cycles = 40 clocks
// for AES-128) plus one clock after its request; avs_s1_readdatavalid
// marks it. avs_s1_waitrequest is the operating core's wait flag for the
// delayed read and tells the host that this read returned no data; the
// host cannot be stalled in real time, since its request was accepted
// T_RED clocks before. Requests that fall into a suspension window or are
// isolated are never executed by the operating core and return no
// readdatavalid. threat / security_emulate report detection and
// suspension; cfg_* rewrite T_RED, T_SUSP (clocks) and the filter enable.
// Asynchronous active-high reset.
module secret_top
  import avs_pkg::*;
#(
  parameter int unsigned KEY_BITS        = 128,
  parameter int unsigned T_RED_BUS       = 4,
  parameter int unsigned T_SUSP_BUS      = 2,
  parameter int unsigned T_LEAD_BUS      = 1,
  parameter int unsigned FIFO_DEPTH      = 128,
  parameter int unsigned TRIG_ENTRIES    = 4,
  parameter bit          TROJAN          = 1'b1,
  parameter logic [23:0] TRIGGER_PATTERN = 24'h5AC396
) (
  input  logic                        clk,
  input  logic                        reset,
  // host bus
  input  logic [ADDR_W-1:0]           avs_s1_address,
  input  logic [DATA_W-1:0]           avs_s1_writedata,
  input  logic                        avs_s1_write,
  input  logic                        avs_s1_read,
  output logic [DATA_W-1:0]           avs_s1_readdata,
  output logic                        avs_s1_readdatavalid,
  output logic                        avs_s1_waitrequest,
  output logic                        avs_s1_irq,
  // security status
  output logic                        threat,
  output logic                        security_emulate,
  output logic                        isolated,
  output logic [$clog2(TRIG_ENTRIES+1)-1:0] triggers_stored,
  // run-time tuning of the SECRET parameters
  input  logic                        cfg_we,
  input  logic [$clog2(FIFO_DEPTH):0] cfg_t_red,
  input  logic [$clog2(FIFO_DEPTH):0] cfg_t_susp,
  input  logic                        cfg_filter_en
);
  localparam int unsigned NK        = KEY_BITS / 32;
  localparam int unsigned BUS_CYCLE = NK + 6;
  localparam int unsigned AW        = $clog2(FIFO_DEPTH);

  avs_req_t req_live, req_del, req_op, scan_entry, pat, mask;
  logic [AW:0] t_red, t_susp, scan_age;
  logic        scan_valid, store, match, filter_en, suspend, alarm;
  logic [2:0]  viol;
  logic [DATA_W-1:0] red_readdata;
  logic        red_waitrequest;
  logic        clk_basic;

  assign req_live = '{read: avs_s1_read, write: avs_s1_write,
                      address: avs_s1_address, writedata: avs_s1_writedata};

  // redundant observation core (3PIP instance #1)
  avs_aes_core #(.KEY_BITS(KEY_BITS), .TROJAN(TROJAN), .TRIGGER_PATTERN(TRIGGER_PATTERN)) u_redundant (
    .clk, .reset,
    .avs_s1_address(req_live.address), .avs_s1_writedata(req_live.writedata),
    .avs_s1_write(req_live.write), .avs_s1_read(req_live.read),
    .avs_s1_readdata(red_readdata), .avs_s1_waitrequest(red_waitrequest),
    .avs_s1_irq()
  );

  trojan_detector #(.NK(NK)) u_detector (
    .clk, .reset, .req_i(req_live), .waitrequest_i(red_waitrequest),
    .readdata_i(red_readdata), .alarm_o(alarm), .viol_o(viol)
  );

  delay_fifo #(.WIDTH(REQ_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .reset, .in_i(req_live), .t_red_i(t_red), .out_o(req_del),
    .scan_age_i(scan_age), .scan_o(scan_entry), .scan_valid_o(scan_valid)
  );

  trigger_analyzer #(.DEPTH(FIFO_DEPTH)) u_analyzer (
    .clk, .reset, .alarm_i(alarm), .t_red_i(t_red), .scan_age_o(scan_age),
    .scan_i(scan_entry), .scan_valid_i(scan_valid), .store_o(store),
    .store_pat_o(pat), .store_mask_o(mask), .busy_o()
  );

  trigger_memory #(.ENTRIES(TRIG_ENTRIES)) u_trig_mem (
    .clk, .reset, .store_i(store), .pat_i(pat), .mask_i(mask),
    .probe_i(req_del), .match_o(match), .count_o(triggers_stored)
  );

  pass_switches u_pass (
    .req_i(req_del), .filter_en_i(filter_en), .match_i(match),
    .req_o(req_op), .isolated_o(isolated)
  );

  secret_controller #(.BUS_CYCLE(BUS_CYCLE), .T_RED_BUS(T_RED_BUS), .T_SUSP_BUS(T_SUSP_BUS),
                      .T_LEAD_BUS(T_LEAD_BUS), .DEPTH(FIFO_DEPTH)) u_ctrl (
    .clk, .reset, .alarm_i(alarm), .cfg_we_i(cfg_we), .cfg_t_red_i(cfg_t_red),
    .cfg_t_susp_i(cfg_t_susp), .cfg_filter_en_i(cfg_filter_en),
    .t_red_o(t_red), .t_susp_o(t_susp), .filter_en_o(filter_en),
    .suspend_o(suspend), .security_emulate_o(security_emulate), .threat_o(threat)
  );

  clock_gate u_cg (.clk_i(clk), .en_i(!suspend), .clk_o(clk_basic));

  // effective operating core (3PIP instance #2)
  avs_aes_core #(.KEY_BITS(KEY_BITS), .TROJAN(TROJAN), .TRIGGER_PATTERN(TRIGGER_PATTERN)) u_operating (
    .clk(clk_basic), .reset,
    .avs_s1_address(req_op.address), .avs_s1_writedata(req_op.writedata),
    .avs_s1_write(req_op.write), .avs_s1_read(req_op.read),
    .avs_s1_readdata(avs_s1_readdata), .avs_s1_waitrequest(avs_s1_waitrequest),
    .avs_s1_irq(avs_s1_irq)
  );

  // a delayed read is answered one clock later if the operating core ran
  always_ff @(posedge clk or posedge reset) begin
    if (reset) avs_s1_readdatavalid <= 1'b0;
    else       avs_s1_readdatavalid <= req_op.read && !avs_s1_waitrequest && !suspend;
  end

endmodule
