// ctr_mode: the counter half of AES-CCM, with its own AES-128 core running
// beside the CBC-MAC core.
//
// Counter block j is A_j = {q-1, nonce, j} with q = 15 - NONCE_BYTES bytes
// for j. The controller pulses do_aes once per CBC-MAC block; while
// j <= pay_blocks (output active) the core encrypts A_j, and 73 cycles later:
//   j = 0   S0 = AES(A0) is stored (1st counter block)
//   j >= 1  ciphertext block j = payload block j ^ AES(A_j) is written to the
//           Ctr_memory at index j-1; bytes beyond the payload length in the
//           last block are written as zero
// Payload block j is read from the Parser_memory at pay_base + j - 1 through
// pay_raddr / pay_rdata. mic = MAC ^ S0 cut to TAG_BYTES (left-aligned, the
// remaining bytes zero). init clears j at the start of a message. The
// structure follows the source design; the zeroing of unused ciphertext
// bytes and the memory addressing are this design's choices.
module ctr_mode
  import ccm_pkg::*;
#(
  parameter int unsigned NONCE_BYTES = 12,
  parameter int unsigned TAG_BYTES   = 16,
  parameter int unsigned AW          = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic                     do_expd,
  input  logic                     do_aes,
  input  block_t                   key_in,
  input  logic [8*NONCE_BYTES-1:0] nonce,
  input  logic [15:0]              pay_blocks,
  input  logic [4:0]               last_bytes,
  input  logic [AW-1:0]            pay_base,
  output logic [AW-1:0]            pay_raddr,
  input  block_t                   pay_rdata,
  output logic                     ct_we,
  output logic [AW-1:0]            ct_waddr,
  output block_t                   ct_wdata,
  input  block_t                   mac,
  output block_t                   mic,
  output logic                     active,
  output logic                     text_valid,
  output logic                     key_valid,
  output block_t                   key_reg
);

  localparam int unsigned Q = 15 - NONCE_BYTES;

  logic [15:0] j;
  block_t      ctr_blk, aes_out, s0, ks_mask, tag_mask;

  assign active    = (j <= pay_blocks);
  assign ctr_blk   = {8'(Q - 1), nonce, (8*Q)'(j)};
  assign pay_raddr = AW'(pay_base + AW'(j) - 1'b1);

  aes_cipher u_aes (
    .clk        (clk),
    .rst_n      (rst_n),
    .do_expd    (do_expd),
    .do_aes     (do_aes && active),
    .key_in     (key_in),
    .text_in    (ctr_blk),
    .text_out   (aes_out),
    .text_valid (text_valid),
    .key_valid  (key_valid),
    .key_reg    (key_reg),
    .ready      ()
  );

  // Keep the bytes of the last block that carry payload.
  always_comb begin
    ks_mask = '1;
    if (j == pay_blocks)
      for (int b = 0; b < 16; b++)
        if (b >= int'(last_bytes)) ks_mask[127-8*b -: 8] = 8'h00;
    tag_mask = '0;
    for (int b = 0; b < 16; b++)
      if (b < int'(TAG_BYTES)) tag_mask[127-8*b -: 8] = 8'hff;
  end

  assign mic = (mac ^ s0) & tag_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j     <= '0;
      ct_we <= 1'b0;
      s0    <= '0;
    end else begin
      ct_we <= 1'b0;
      if (init) begin
        j <= '0;
      end else if (text_valid) begin
        if (j == '0) begin
          s0 <= aes_out;                     // 1st counter block
        end else begin
          ct_we    <= 1'b1;
          ct_waddr <= AW'(j - 16'd1);
          ct_wdata <= (pay_rdata ^ aes_out) & ks_mask;
        end
        j <= j + 16'd1;
      end
    end
  end

endmodule
