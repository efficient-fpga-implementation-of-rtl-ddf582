// ccm_data_length: holds the lengths of the current message and derives the
// block counts that the CCM controller, formatter and counter module use.
//
// On load it stores Plen (payload bytes) and Alen (associated data bytes).
// From them, combinationally:
//   a_flag          = Alen != 0
//   aad_blocks      = a_flag ? ceil((Alen + 2) / 16) : 0   (2-byte length prefix)
//   pay_blocks      = ceil(Plen / 16)
//   total_block_num = 1 + aad_blocks + pay_blocks           (B0 first)
//   last_bytes      = bytes in the last payload block (1..16)
// The block name and the total_block_num count come from the source design,
// which gives no formulas; the formulas are those of NIST SP 800-38C
// formatting. Only the two-byte associated-data length encoding is
// supported (Alen < 65280). Outputs change one cycle after load.
module ccm_data_length (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [15:0] plen_in,
  input  logic [15:0] alen_in,
  output logic [15:0] plen,
  output logic [15:0] alen,
  output logic        a_flag,
  output logic [15:0] aad_blocks,
  output logic [15:0] pay_blocks,
  output logic [15:0] total_block_num,
  output logic [4:0]  last_bytes
);

  logic [16:0] aad_sum;
  logic [16:0] pay_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      plen <= '0;
      alen <= '0;
    end else if (load) begin
      plen <= plen_in;
      alen <= alen_in;
    end
  end

  assign a_flag          = (alen != '0);
  assign aad_sum         = {1'b0, alen} + 17'd17;
  assign pay_sum         = {1'b0, plen} + 17'd15;
  assign aad_blocks      = a_flag ? 16'(aad_sum >> 4) : 16'd0;
  assign pay_blocks      = 16'(pay_sum >> 4);
  assign total_block_num = 16'd1 + aad_blocks + pay_blocks;
  assign last_bytes      = (plen[3:0] == 4'd0) ? 5'd16 : {1'b0, plen[3:0]};

endmodule
