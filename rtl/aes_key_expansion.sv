// aes_key_expansion: AES-128 key expansion with a saved key table.
//
// A start pulse loads KEY_Input into the AES_KEY register and into
// Key_Tbl[0]; the ten following round keys are then computed and stored in
// Key_Tbl[1..10], where they stay until the next start. Because the table
// keeps its contents, messages that reuse a key need no new expansion.
//
// Each round takes 9 cycles, the phases of one round being:
//   0..3  the four bytes of RotWord(w3) go, one per cycle, to lane 0 of the
//         shared S_Box (8-bit unit); its registered result returns one cycle
//         later, the first byte XORed with Rcon (G_function)
//   4     Temp[0] = w0 ^ G, using the last S_Box byte as it arrives
//   5..7  Temp[i] = Temp[i-1] ^ wi (one 32-bit XOR per cycle)
//   8     Temp is written to Key_Tbl[round] and becomes the previous key
// The whole expansion therefore ends 1 + 10*9 = 91 cycles after start is
// sampled (done pulses in that cycle). The 9-cycle round and the shared
// byte-wide S_Box follow the source design; the exact phase split is this
// design's choice. rd_idx selects the round key on rd_key (combinational); key_reg shows the
// key the table was expanded from.
module aes_key_expansion
  import ccm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  block_t      key_in,
  output byte_t       sbox_addr,
  input  byte_t       sbox_data,
  output logic        busy,
  output logic        done,
  input  logic [3:0]  rd_idx,
  output block_t      rd_key,
  output block_t      key_reg
);

  block_t      aes_key;                 // AES_KEY register
  block_t      key_tbl [KEY_TBL_SIZE];  // Key_Tbl[0..10]
  block_t      prev;                    // round key being extended
  word_t       temp [4];                // Temp[4][32]
  byte_t       g [3];                   // G_function bytes 0..2
  logic [3:0]  round;
  logic [3:0]  phase;
  word_t       rot;
  word_t       g_word;

  assign rot    = {prev[23:0], prev[31:24]};       // RotWord(w3)
  assign g_word = {g[0], g[1], g[2], sbox_data};

  always_comb begin
    sbox_addr = 8'h00;
    if (busy && phase < 4) sbox_addr = rot[31 - 8*phase[1:0] -: 8];
  end

  assign key_reg = aes_key;
  assign rd_key = (rd_idx < 4'(KEY_TBL_SIZE)) ? key_tbl[rd_idx] : key_tbl[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      round <= 4'd1;
      phase <= 4'd0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        round <= 4'd1;
        phase <= 4'd0;
      end else if (busy) begin
        if (phase == 4'd8) begin
          phase <= 4'd0;
          if (round == 4'(AES_ROUNDS)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            round <= round + 4'd1;
          end
        end else begin
          phase <= phase + 4'd1;
        end
      end
    end
  end

  // Datapath registers, no reset: they are only read once written.
  always_ff @(posedge clk) begin
    if (start) begin
      aes_key    <= key_in;
      key_tbl[0] <= key_in;
      prev       <= key_in;
    end else if (busy) begin
      unique case (phase)
        4'd1:    g[0]    <= sbox_data ^ rcon(round);
        4'd2:    g[1]    <= sbox_data;
        4'd3:    g[2]    <= sbox_data;
        4'd4:    temp[0] <= prev[127:96] ^ g_word;
        4'd5:    temp[1] <= temp[0] ^ prev[95:64];
        4'd6:    temp[2] <= temp[1] ^ prev[63:32];
        4'd7:    temp[3] <= temp[2] ^ prev[31:0];
        4'd8: begin
          key_tbl[round] <= {temp[0], temp[1], temp[2], temp[3]};
          prev           <= {temp[0], temp[1], temp[2], temp[3]};
        end
        default: ;
      endcase
    end
  end

endmodule
