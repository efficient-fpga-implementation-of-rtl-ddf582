// aes_mixcolumn: AES MixColumns applied to one 32-bit state column.
//
// Combinational. col_in holds bytes s0..s3 of a column with s0 in bits
// [31:24]; each output byte is the GF(2^8) product of the fixed matrix
// {02 03 01 01} (rotated per row) with the column. The round datapath uses
// one instance, once per column per round; the four byte outputs are the
// four MixColumn units of the source design's datapath, which does not
// print the matrix; the coefficients are those of FIPS-197.
module aes_mixcolumn
  import ccm_pkg::*;
(
  input  word_t col_in,
  output word_t col_out
);

  byte_t s [4];
  byte_t d [4];

  always_comb begin
    for (int r = 0; r < 4; r++) s[r] = col_in[31-8*r -: 8];
    for (int r = 0; r < 4; r++)
      d[r] = xtime(s[r]) ^ xtime(s[(r+1)%4]) ^ s[(r+1)%4] ^ s[(r+2)%4] ^ s[(r+3)%4];
    col_out = {d[0], d[1], d[2], d[3]};
  end

endmodule
