// aes_datapath -- iterative AES round datapath (SubBytes, ShiftRows,
// MixColumns, AddRoundKey and their inverses), one round per clock.
//
// start_i loads block_i XOR the first round key (round key 0 when
// encrypting, round key NR when decrypting); each of the next NR clocks
// applies one round, the last one without (Inv)MixColumns. The round
// counter doubles as the round-key address rk_idx_o, so the key schedule is
// read combinationally on rk_i in the same clock. An operation therefore
// takes NR clocks after the start clock (10, 12 or 14), the "bus cycle" of
// the core. done_o pulses for one clock with the result on block_o, which
// holds until the next start. Decryption is the FIPS-197 inverse cipher.
module aes_datapath
  import aes_pkg::*;
#(
  parameter int unsigned NK = 4
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    start_i,
  input  logic                    decrypt_i,
  input  block_t                  block_i,
  input  block_t                  rk_i,
  output logic [$clog2(NK+7)-1:0] rk_idx_o,
  output block_t                  block_o,
  output logic                    busy_o,
  output logic                    done_o
);
  localparam int unsigned NR = NK + 6;
  localparam int unsigned CW = $clog2(NR + 1);

  logic [CW-1:0] round;   // 1..NR while busy
  logic          dec_q;
  block_t        state;

  always_comb begin
    if (!busy_o) rk_idx_o = decrypt_i ? CW'(NR) : '0;
    else         rk_idx_o = dec_q ? CW'(NR) - round : round;
  end

  block_t next_state;
  always_comb begin
    if (!dec_q) begin
      next_state = shift_rows(sub_bytes(state));
      if (round != CW'(NR)) next_state = mix_columns(next_state);
      next_state = next_state ^ rk_i;
    end else begin
      next_state = inv_sub_bytes(inv_shift_rows(state)) ^ rk_i;
      if (round != CW'(NR)) next_state = inv_mix_columns(next_state);
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      busy_o <= 1'b0;
      done_o <= 1'b0;
      round  <= '0;
      dec_q  <= 1'b0;
      state  <= '0;
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_o) begin
        state  <= block_i ^ rk_i;
        dec_q  <= decrypt_i;
        round  <= CW'(1);
        busy_o <= 1'b1;
      end else if (busy_o) begin
        state <= next_state;
        if (round == CW'(NR)) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
        end else begin
          round <= round + CW'(1);
        end
      end
    end
  end

  assign block_o = state;

endmodule
