// aes_cipher: iterative AES-128 encryption core with a 32-bit round
// datapath, its own saved key table and the READY / KEY / AES controller.
//
// Controller: in READY a do_expd pulse starts the key expansion (state KEY);
// a do_aes pulse with a valid key table starts an encryption directly and
// skips the expansion. In KEY the core waits for the expansion to finish and
// then for do_aes. When the block is done text_valid pulses for one cycle
// and the core returns to READY.
//
// Round datapath: each round processes one state column per cycle, in the
// order ShiftRow, SubByte, MixColumn, AddRoundKey:
//   phase p (0..3)  ShiftRow register <= column p of the shifted state
//   phase p+1       S_Box (4 lanes) substitutes the four bytes
//   phase p+2       MixColumn (skipped in round 10) and XOR with round-key
//                   word p, written to the next-state buffer
//   phase 6         the next-state buffer becomes the state
// so one round takes 7 cycles. With the input register cycle, the initial
// AddRoundKey cycle and the output cycle, one block takes 3 + 10*7 = 73
// cycles: do_aes sampled in cycle 0, text_valid high (one cycle) in cycle 72;
// text_out (AES_Output_buf) holds the result from then until the next block
// ends. Key expansion takes 91 cycles
// (aes_key_expansion). The 32-bit ShiftRow-before-SubByte order, the shared
// S_Box, the three-state controller and the 7 and 9 cycle rounds follow the
// source design; the pipeline split within a round is this design's choice.
// do_aes is ignored while no key table is valid, and both start pulses are
// ignored while the core is busy.
module aes_cipher
  import ccm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   do_expd,
  input  logic   do_aes,
  input  block_t key_in,
  input  block_t text_in,
  output block_t text_out,
  output logic   text_valid,
  output logic   key_valid,
  output block_t key_reg,
  output logic   ready
);

  typedef enum logic [1:0] {S_READY, S_KEY, S_AES} state_t;
  state_t state;

  // Key expansion and shared S_Box.
  logic        kx_start, kx_busy, kx_done;
  byte_t       kx_sbox_addr;
  logic [3:0]  rk_idx;
  block_t      rk;
  word_t       sbox_addr, sbox_data;

  // Round datapath.
  block_t      in_reg;       // AES_Input_Data
  block_t      st;           // state buffer
  word_t       nxt [4];      // next-state buffer
  word_t       sr_word;      // ShiftRow [4][32] output word
  word_t       mc_word;
  word_t       rk_word;
  logic [3:0]  round;        // 0: initial AddRoundKey, 1..10 rounds
  logic        start_aes;
  logic        key_ok;
  logic [2:0]  phase;
  logic [1:0]  wr_col;

  assign ready     = (state == S_READY);
  assign key_valid = key_ok | kx_done;
  assign kx_start = (state == S_READY) && do_expd;
  assign start_aes = do_aes && key_valid &&
                     ((state == S_READY && !do_expd) || state == S_KEY);

  aes_key_expansion u_kx (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (kx_start),
    .key_in    (key_in),
    .sbox_addr (kx_sbox_addr),
    .sbox_data (sbox_data[7:0]),
    .busy      (kx_busy),
    .done      (kx_done),
    .rd_idx    (rk_idx),
    .rd_key    (rk),
    .key_reg   (key_reg)
  );

  // One S_Box for both users: lane 0 belongs to the key expansion while it
  // runs, all four lanes to the round datapath otherwise.
  assign sbox_addr = kx_busy ? {24'h0, kx_sbox_addr} : sr_word;

  aes_sbox #(.LANES(4)) u_sbox (
    .clk  (clk),
    .addr (sbox_addr),
    .data (sbox_data)
  );

  aes_mixcolumn u_mc (
    .col_in  (sbox_data),
    .col_out (mc_word)
  );

  assign rk_idx  = (round <= 4'(AES_ROUNDS)) ? round : 4'd0;
  assign wr_col  = 2'(phase - 3'd2);
  assign rk_word = rk[127 - 32*wr_col -: 32];

  // Column c of ShiftRows(st): row r comes from column (c + r) mod 4.
  function automatic word_t shift_col(input block_t s, input logic [1:0] c);
    word_t w;
    for (int r = 0; r < 4; r++)
      w[31-8*r -: 8] = s[127 - 32*((int'(c) + r) % 4) - 8*r -: 8];
    return w;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_READY;
      key_ok     <= 1'b0;
      text_valid <= 1'b0;
      round      <= 4'd0;
      phase      <= 3'd0;
    end else begin
      text_valid <= 1'b0;
      if (kx_done) key_ok <= 1'b1;
      unique case (state)
        S_READY: begin
          if (do_expd) begin
            state  <= S_KEY;
            key_ok <= 1'b0;
          end else if (start_aes) begin
            state <= S_AES;
            round <= 4'd0;
            phase <= 3'd0;
          end
        end
        S_KEY: begin
          if (start_aes) begin
            state <= S_AES;
            round <= 4'd0;
            phase <= 3'd0;
          end
        end
        S_AES: begin
          if (round == 4'd0) begin
            round <= 4'd1;
          end else if (phase == 3'd6) begin
            phase <= 3'd0;
            round <= round + 4'd1;
            if (round == 4'(AES_ROUNDS)) begin
              text_valid <= 1'b1;
              state      <= S_READY;
            end
          end else begin
            phase <= phase + 3'd1;
          end
        end
        default: state <= S_READY;
      endcase
    end
  end

  // Datapath registers, no reset: each is written before it is read.
  always_ff @(posedge clk) begin
    if (start_aes) in_reg <= text_in;
    sr_word <= shift_col(st, phase[1:0]);
    if (state == S_AES) begin
      if (round == 4'd0) begin
        st <= in_reg ^ rk;                       // initial AddRoundKey
      end else begin
        if (phase >= 3'd2 && phase <= 3'd5)
          nxt[wr_col] <= ((round == 4'(AES_ROUNDS)) ? sbox_data : mc_word) ^ rk_word;
        if (phase == 3'd6) begin
          st <= {nxt[0], nxt[1], nxt[2], nxt[3]};
          if (round == 4'(AES_ROUNDS))
            text_out <= {nxt[0], nxt[1], nxt[2], nxt[3]};  // AES_Output_buf
        end
      end
    end
  end

endmodule
