// ccm_pkg: types, constants and GF(2^8) helper functions shared by the
// AES-128 core and the AES-CCM blocks.
//
// Byte order convention used everywhere: a 128-bit block holds byte 0 in
// bits [127:120] and byte 15 in bits [7:0], which is the order in which the
// AES and CCM standards write blocks as hex strings. AES state column c is
// bytes 4c..4c+3 (bits [127-32c -: 32]), row r is byte 4c+r.
//
// The cycle budgets (7 cycles per AES round, 73 per block, 9 per key
// expansion round) follow the source design; the enum encodings are this
// design's choice.
//
// The S-box table is not stored as a list of numbers: sbox_calc() derives each
// entry from its definition, the multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 (computed as a^254) followed by the affine transform
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
package ccm_pkg;

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;

  localparam int unsigned AES_ROUNDS   = 10;  // AES-128
  localparam int unsigned KEY_TBL_SIZE = AES_ROUNDS + 1;

  // Per-round cycle budgets of the 32-bit datapath.
  localparam int unsigned AES_ROUND_CYCLES = 7;
  localparam int unsigned KEY_ROUND_CYCLES = 9;
  // Cycles from the cycle in which do_aes is sampled to the cycle in which
  // text_valid is high, both counted: 73.
  localparam int unsigned AES_BLOCK_CYCLES = 3 + AES_ROUNDS * AES_ROUND_CYCLES;
  // Cycles from the do_expd sample to the first cycle with the key table valid.
  localparam int unsigned KEY_EXP_CYCLES   = 1 + AES_ROUNDS * KEY_ROUND_CYCLES;

  // Type tag carried with every byte entering the formatting function.
  typedef enum logic {
    T_ASSOCIATE = 1'b0,
    T_PAYLOAD   = 1'b1
  } data_type_t;

  // States of the AES-CCM controller.
  typedef enum logic [2:0] {
    C_READY     = 3'd0,
    C_FORMAT    = 3'd1,
    C_KEY_EXP   = 3'd2,
    C_DO_AES    = 3'd3,
    C_NEXT_DATA = 3'd4,
    C_CBC_DONE  = 3'd5
  } ccm_state_t;

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiplication (shift and add).
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic byte_t gf_inv(input byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    // 254 = 8'b1111_1110
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic byte_t sbox_calc(input byte_t a);
    byte_t b = gf_inv(a);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // Round constant of key-expansion round r (1..10): x^(r-1) in GF(2^8).
  function automatic byte_t rcon(input logic [3:0] r);
    byte_t c = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < int'(r)) c = xtime(c);
    return c;
  endfunction

endpackage
