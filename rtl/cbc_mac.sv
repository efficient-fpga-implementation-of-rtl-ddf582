// cbc_mac: the CBC-MAC half of AES-CCM. It chains the formatted blocks
// through its own AES-128 core: X1 = AES(B0), Xi+1 = AES(Bi ^ Xi).
//
// For each block the controller presents it on block_in and pulses do_aes;
// first selects the unchained path for B0 (the multiplexer of the source
// design's CBC-MAC structure). 73 cycles later text_valid pulses and the
// result is stored in the MAC Data register, which feeds the next chaining
// XOR and, after the last block, the MIC computation. Key expansion is
// requested with do_expd and reported on key_valid, as in aes_cipher.
module cbc_mac
  import ccm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   do_expd,
  input  logic   do_aes,
  input  logic   first,
  input  block_t key_in,
  input  block_t block_in,
  output block_t mac,
  output logic   text_valid,
  output logic   key_valid,
  output block_t key_reg
);

  block_t aes_in, aes_out;

  assign aes_in = first ? block_in : (block_in ^ mac);

  aes_cipher u_aes (
    .clk        (clk),
    .rst_n      (rst_n),
    .do_expd    (do_expd),
    .do_aes     (do_aes),
    .key_in     (key_in),
    .text_in    (aes_in),
    .text_out   (aes_out),
    .text_valid (text_valid),
    .key_valid  (key_valid),
    .key_reg    (key_reg),
    .ready      ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          mac <= '0;
    else if (text_valid) mac <= aes_out;    // MAC Data register
  end

  // Blocks are only requested once the key table is valid.
  assert property (@(posedge clk) disable iff (!rst_n) do_aes |-> key_valid);

endmodule
