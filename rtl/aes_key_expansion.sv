// aes_key_expansion -- key-expansion datapath of the AES core.
//
// Expands a 128-, 192- or 256-bit user key (NK = 4, 6 or 8 words) into the
// 4*(NR+1) words of the FIPS-197 key schedule, one word per clock, into a
// register array. A round-key address (the round counter of the cipher
// datapath) selects four consecutive words as one 128-bit round key; the
// read is combinational.
//
// Interface: start_i (one clock) loads key_i, whose word 0 is key_i[0]
// (the word the host writes to address 0), and restarts the expansion;
// ready_o rises 4*(NR+1)-NK clocks later and stays high until the next
// start. rk_idx_i in 0..NR selects the round key on rk_o.
// The expansion rule follows FIPS-197; computing one word per clock into a
// register file is this design's choice, the source core's is not known.
module aes_key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned NK = 4
) (
  input  logic                        clk,
  input  logic                        reset,
  input  logic                        start_i,
  input  word_t                       key_i [8],
  input  logic [$clog2(NK+7)-1:0]     rk_idx_i,
  output block_t                      rk_o,
  output logic                        ready_o
);
  localparam int unsigned NR = NK + 6;
  localparam int unsigned NW = 4 * (NR + 1);
  localparam int unsigned IW = $clog2(NW + 1);

  word_t           w [NW];
  logic [IW-1:0]   idx;     // next word to compute
  logic [IW-1:0]   phase;   // idx mod NK
  byte_t           rcon;
  logic            busy;

  word_t prev, temp;
  always_comb begin
    prev = w[idx - IW'(1)];
    if (phase == '0)
      temp = sub_word(rot_word(prev)) ^ {rcon, 24'h0};
    else if (NK > 6 && phase == IW'(4))
      temp = sub_word(prev);
    else
      temp = prev;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      busy    <= 1'b0;
      ready_o <= 1'b0;
      idx     <= IW'(NK);
      phase   <= '0;
      rcon    <= 8'h01;
    end else if (start_i) begin
      for (int i = 0; i < int'(NK); i++) w[i] <= key_i[i];
      busy    <= 1'b1;
      ready_o <= 1'b0;
      idx     <= IW'(NK);
      phase   <= '0;
      rcon    <= 8'h01;
    end else if (busy) begin
      w[idx] <= w[idx - IW'(NK)] ^ temp;
      if (phase == '0) rcon <= xtime(rcon);
      phase <= (phase == IW'(NK - 1)) ? '0 : phase + IW'(1);
      if (idx == IW'(NW - 1)) begin
        busy    <= 1'b0;
        ready_o <= 1'b1;
      end else begin
        idx <= idx + IW'(1);
      end
    end
  end

  assign rk_o = {w[4*rk_idx_i], w[4*rk_idx_i + 1], w[4*rk_idx_i + 2], w[4*rk_idx_i + 3]};

endmodule
