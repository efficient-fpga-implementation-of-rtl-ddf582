// aes_sbox: the shared 32-bit S_Box, a 256 x 8 substitution ROM with four
// byte lanes.
//
// Four bytes arrive on addr (one S_Box_Addr word) and their four
// substitutions appear on data one clock later (registered read, as a block
// or distributed ROM with an output register would give). The 32-bit round
// datapath uses all four lanes, one state column per cycle; the key
// expansion uses lane 0 only, one byte per cycle. Sharing one S_Box between
// the two follows the source design; the one-cycle registered read is this
// design's choice. The table is filled at start-up from ccm_pkg::sbox_calc,
// which derives every entry from the S-box definition.
module aes_sbox
  import ccm_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic                 clk,
  input  logic [8*LANES-1:0]   addr,
  output logic [8*LANES-1:0]   data
);

  byte_t rom [256];

  initial begin
    for (int i = 0; i < 256; i++) rom[i] = sbox_calc(byte_t'(i));
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < int'(LANES); l++)
      data[8*l +: 8] <= rom[addr[8*l +: 8]];
  end

endmodule
