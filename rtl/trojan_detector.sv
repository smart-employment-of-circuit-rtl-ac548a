// trojan_detector -- run-time Trojan monitor on the redundant observation
// core, built as hardware assertion checkers on its bus.
//
// It keeps its own copy of every key word the host writes (addresses
// 0..NK-1) and checks each read response, which arrives one clock after the
// accepted read (read high, wait request low):
//   V_KEY    the data of a read from anywhere but the control word equals
//            one of the stored key words (a key leak);
//   V_FORMAT a read of the write-only space (0..11) or of the control word
//            does not have the control-word format (reserved bits set);
//   V_RSV    a read of reserved space (16..30) returns non-zero.
// alarm_o is combinational and high in the clock in which the offending
// data is on readdata_i; viol_o says which checks failed.
// The three rules and the key copy follow the document. A legitimate
// result or control word equal to a stored key word also raises V_KEY
// (probability about NK * 2^-32 per read); this design accepts that.
module trojan_detector
  import avs_pkg::*;
#(
  parameter int unsigned NK = 4
) (
  input  logic              clk,
  input  logic              reset,
  input  avs_req_t          req_i,
  input  logic              waitrequest_i,
  input  logic [DATA_W-1:0] readdata_i,
  output logic              alarm_o,
  output logic [2:0]        viol_o
);
  localparam int unsigned V_KEY = 0, V_FORMAT = 1, V_RSV = 2;

  logic [DATA_W-1:0] key_copy [NK];
  logic [NK-1:0]     key_seen;
  logic              rsp_pending;
  logic [ADDR_W-1:0] rsp_addr;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      key_seen    <= '0;
      rsp_pending <= 1'b0;
      rsp_addr    <= '0;
      for (int i = 0; i < int'(NK); i++) key_copy[i] <= '0;
    end else begin
      rsp_pending <= req_i.read && !waitrequest_i;
      rsp_addr    <= req_i.address;
      if (req_i.write && req_i.address < ADDR_W'(NK)) begin
        key_copy[req_i.address[$clog2(NK)-1:0]] <= req_i.writedata;
        key_seen[req_i.address[$clog2(NK)-1:0]] <= 1'b1;
      end
    end
  end

  always_comb begin
    viol_o = '0;
    if (rsp_pending) begin
      if (rsp_addr != CTRL_ADDR)
        for (int i = 0; i < int'(NK); i++)
          if (key_seen[i] && readdata_i == key_copy[i]) viol_o[V_KEY] = 1'b1;
      if ((is_write_only(rsp_addr) || rsp_addr == CTRL_ADDR) &&
          (readdata_i & ~CTRL_USED_MASK) != '0)
        viol_o[V_FORMAT] = 1'b1;
      if (is_reserved(rsp_addr) && readdata_i != '0)
        viol_o[V_RSV] = 1'b1;
    end
  end

  assign alarm_o = |viol_o;

endmodule
