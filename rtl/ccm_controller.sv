// ccm_controller: the CCM controller, sequencing one generation-encryption
// operation through the states READY, FORMAT, KEY_EXP, DO_AES, NEXT_DATA and
// CBC_DONE of the source design.
//
//   READY      wait for i_do_cbc with Plen != 0; load pulses so the message
//              parameters (key, nonce, lengths) are captured
//   FORMAT     do_format is high until parsing_counter == total_block_num
//   KEY_EXP    if the stored key tables already hold this key, skip the
//              expansion; otherwise pulse do_expd to both AES cores and wait
//              until both report a valid key table (key_exp_done)
//   DO_AES     pulse do_aes (CBC-MAC always, counter while it has counter
//              blocks left) and wait for text_valid
//   NEXT_DATA  enc_block_counter has counted the block; back to DO_AES until
//              enc_block_counter == total_block_num, then CBC_DONE
//   CBC_DONE   done pulses for one cycle (ciphertext and MIC are ready);
//              back to READY
// The source design shows no exit from CBC_DONE; returning to READY after
// one cycle is this design's choice, as is the key comparison used to decide
// whether the expansion can be skipped. first marks the B0 block for the
// CBC-MAC. The CBC-MAC and counter cores start together and take the same
// 73 cycles, so both results are ready when the CBC-MAC text_valid arrives.
module ccm_controller
  import ccm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        i_do_cbc,
  input  logic [15:0] plen_in,
  input  block_t      key_q,
  input  logic [15:0] total_block_num,
  input  logic [15:0] parsing_counter,
  input  logic        cbc_key_valid,
  input  logic        ctr_key_valid,
  input  block_t      cbc_key_reg,
  input  block_t      ctr_key_reg,
  input  logic        cbc_text_valid,
  input  logic        ctr_text_valid,
  input  logic        ctr_active,
  output logic        load,
  output logic        do_format,
  output logic        do_expd,
  output logic        do_aes_cbc,
  output logic        do_aes_ctr,
  output logic        first,
  output logic [15:0] enc_block_counter,
  output logic        busy,
  output logic        done,
  output ccm_state_t  state
);

  logic issued;       // request of the current KEY_EXP / DO_AES visit sent
  logic need_exp;

  assign need_exp = !(cbc_key_valid && ctr_key_valid &&
                      cbc_key_reg == key_q && ctr_key_reg == key_q);

  assign load       = (state == C_READY) && i_do_cbc && (plen_in != '0);
  assign do_format  = (state == C_FORMAT) && (parsing_counter != total_block_num);
  assign do_expd    = (state == C_KEY_EXP) && !issued && need_exp;
  assign do_aes_cbc = (state == C_DO_AES) && !issued;
  assign do_aes_ctr = do_aes_cbc && ctr_active;
  assign first      = (enc_block_counter == '0);
  assign busy       = (state != C_READY);
  assign done       = (state == C_CBC_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= C_READY;
      issued            <= 1'b0;
      enc_block_counter <= '0;
    end else begin
      unique case (state)
        C_READY: begin
          if (load) begin
            state             <= C_FORMAT;
            enc_block_counter <= '0;
          end
        end
        C_FORMAT: begin
          if (parsing_counter == total_block_num) begin
            state  <= C_KEY_EXP;
            issued <= 1'b0;
          end
        end
        C_KEY_EXP: begin
          if (!issued) begin
            if (need_exp) issued <= 1'b1;
            else          state  <= C_DO_AES;
          end else if (cbc_key_valid && ctr_key_valid) begin
            state  <= C_DO_AES;
            issued <= 1'b0;
          end
        end
        C_DO_AES: begin
          if (!issued) begin
            issued <= 1'b1;
          end else if (cbc_text_valid) begin
            enc_block_counter <= enc_block_counter + 16'd1;
            state             <= C_NEXT_DATA;
          end
        end
        C_NEXT_DATA: begin
          issued <= 1'b0;
          if (enc_block_counter == total_block_num) state <= C_CBC_DONE;
          else                                      state <= C_DO_AES;
        end
        C_CBC_DONE: state <= C_READY;
        default: state <= C_READY;
      endcase
    end
  end

  // The two AES cores run in lock step: when the counter core worked on a
  // block, it finishes in the same cycle as the CBC-MAC core.
  assert property (@(posedge clk) disable iff (!rst_n) ctr_text_valid |-> cbc_text_valid);

endmodule
