// ccm_top: AES-CCM generation-encryption engine (NIST SP 800-38C) for
// IEEE 1609.2 style messages: AES-128, 12-byte nonce, 16-byte MIC by default.
//
// Data flow: the host streams associated-data and payload bytes into the
// Input_register (format_input); the formatting function (ccm_formatter)
// builds B0 and the padded blocks into the Parser_memory; then the CBC-MAC
// (cbc_mac) and the counter module (ctr_mode), each with its own AES-128
// core and key table, run side by side over the stored blocks. Ciphertext
// blocks land in the Ctr_memory; the MIC is MAC ^ AES(A0).
//
// Host interface:
//   i_do_cbc  start pulse; key, nonce, plen and alen are captured with it
//             (plen must be non-zero; messages must fit the Parser_memory:
//             1 + ceil((alen+2)/16) + ceil(plen/16) <= MEM_DEPTH blocks)
//   in_*      byte stream with valid/ready handshake: all associated-data
//             bytes (T_ASSOCIATE) first, then the plen payload bytes
//             (T_PAYLOAD); bytes may be written before or after i_do_cbc
//   done      one-cycle pulse; from then until the next start, mic holds the
//             MIC (TAG_BYTES bytes, left-aligned) and ct_raddr / ct_rdata
//             read ciphertext block k (bytes past plen are zero)
// Timing: formatting takes about one cycle per input byte; key expansion 91
// cycles, skipped when the key equals the one already expanded; then 74
// cycles per formatted block (73 for AES plus the NEXT_DATA cycle).
module ccm_top
  import ccm_pkg::*;
#(
  parameter int unsigned NONCE_BYTES = 12,
  parameter int unsigned TAG_BYTES   = 16,
  parameter int unsigned IN_DEPTH    = 256,
  parameter int unsigned MEM_DEPTH   = 256,
  localparam int unsigned AW         = $clog2(MEM_DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     i_do_cbc,
  input  logic [127:0]             key,
  input  logic [8*NONCE_BYTES-1:0] nonce,
  input  logic [15:0]              plen,
  input  logic [15:0]              alen,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [7:0]               in_data,
  input  data_type_t               in_type,
  output logic                     busy,
  output logic                     done,
  output logic [127:0]             mic,
  input  logic [AW-1:0]            ct_raddr,
  output logic [127:0]             ct_rdata
);

  // Message parameters captured at the start.
  block_t                   key_q;
  logic [8*NONCE_BYTES-1:0] nonce_q;
  logic                     load;

  always_ff @(posedge clk) begin
    if (load) begin
      key_q   <= key;
      nonce_q <= nonce;
    end
  end

  // Lengths and block counts.
  logic [15:0] plen_q, alen_q, aad_blocks, pay_blocks, total_block_num;
  logic        a_flag;
  logic [4:0]  last_bytes;

  ccm_data_length u_len (
    .clk             (clk),
    .rst_n           (rst_n),
    .load            (load),
    .plen_in         (plen),
    .alen_in         (alen),
    .plen            (plen_q),
    .alen            (alen_q),
    .a_flag          (a_flag),
    .aad_blocks      (aad_blocks),
    .pay_blocks      (pay_blocks),
    .total_block_num (total_block_num),
    .last_bytes      (last_bytes)
  );

  // Input_register.
  logic       head_valid, pop;
  byte_t      head_data;
  data_type_t head_type;

  format_input #(.DEPTH(IN_DEPTH)) u_in (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_data    (in_data),
    .in_type    (in_type),
    .head_valid (head_valid),
    .head_data  (head_data),
    .head_type  (head_type),
    .pop        (pop)
  );

  // Formatting function and Parser_memory.
  logic          do_format, pm_we;
  logic [AW-1:0] pm_waddr;
  block_t        pm_wdata;
  logic [15:0]   parsing_counter;
  logic [AW-1:0] pm_raddr [2];
  block_t        pm_rdata [2];

  ccm_formatter #(
    .NONCE_BYTES (NONCE_BYTES),
    .TAG_BYTES   (TAG_BYTES),
    .AW          (AW)
  ) u_fmt (
    .clk             (clk),
    .rst_n           (rst_n),
    .do_format       (do_format),
    .nonce           (nonce_q),
    .plen            (plen_q),
    .alen            (alen_q),
    .a_flag          (a_flag),
    .head_valid      (head_valid),
    .head_data       (head_data),
    .head_type       (head_type),
    .pop             (pop),
    .pm_we           (pm_we),
    .pm_addr         (pm_waddr),
    .pm_wdata        (pm_wdata),
    .parsing_counter (parsing_counter)
  );

  ccm_regfile #(.WIDTH(128), .DEPTH(MEM_DEPTH), .NRD(2)) u_parser_mem (
    .clk   (clk),
    .we    (pm_we),
    .waddr (pm_waddr),
    .wdata (pm_wdata),
    .raddr (pm_raddr),
    .rdata (pm_rdata)
  );

  // Controller.
  logic        do_expd, do_aes_cbc, do_aes_ctr, first;
  logic [15:0] enc_block_counter;
  logic        cbc_key_valid, ctr_key_valid, cbc_text_valid, ctr_text_valid, ctr_active;
  block_t      cbc_key_reg, ctr_key_reg, mac;
  ccm_state_t  cstate;

  ccm_controller u_ctrl (
    .clk               (clk),
    .rst_n             (rst_n),
    .i_do_cbc          (i_do_cbc),
    .plen_in           (plen),
    .key_q             (key_q),
    .total_block_num   (total_block_num),
    .parsing_counter   (parsing_counter),
    .cbc_key_valid     (cbc_key_valid),
    .ctr_key_valid     (ctr_key_valid),
    .cbc_key_reg       (cbc_key_reg),
    .ctr_key_reg       (ctr_key_reg),
    .cbc_text_valid    (cbc_text_valid),
    .ctr_text_valid    (ctr_text_valid),
    .ctr_active        (ctr_active),
    .load              (load),
    .do_format         (do_format),
    .do_expd           (do_expd),
    .do_aes_cbc        (do_aes_cbc),
    .do_aes_ctr        (do_aes_ctr),
    .first             (first),
    .enc_block_counter (enc_block_counter),
    .busy              (busy),
    .done              (done),
    .state             (cstate)
  );

  // CBC-MAC.
  assign pm_raddr[0] = AW'(enc_block_counter);

  cbc_mac u_cbc (
    .clk        (clk),
    .rst_n      (rst_n),
    .do_expd    (do_expd),
    .do_aes     (do_aes_cbc),
    .first      (first),
    .key_in     (key_q),
    .block_in   (pm_rdata[0]),
    .mac        (mac),
    .text_valid (cbc_text_valid),
    .key_valid  (cbc_key_valid),
    .key_reg    (cbc_key_reg)
  );

  // Counter module and Ctr_memory.
  logic          ct_we;
  logic [AW-1:0] ct_waddr;
  block_t        ct_wdata;
  logic [AW-1:0] ct_ra [1];
  block_t        ct_rd [1];

  ctr_mode #(
    .NONCE_BYTES (NONCE_BYTES),
    .TAG_BYTES   (TAG_BYTES),
    .AW          (AW)
  ) u_ctr (
    .clk        (clk),
    .rst_n      (rst_n),
    .init       (load),
    .do_expd    (do_expd),
    .do_aes     (do_aes_ctr),
    .key_in     (key_q),
    .nonce      (nonce_q),
    .pay_blocks (pay_blocks),
    .last_bytes (last_bytes),
    .pay_base   (AW'(16'd1 + aad_blocks)),
    .pay_raddr  (pm_raddr[1]),
    .pay_rdata  (pm_rdata[1]),
    .ct_we      (ct_we),
    .ct_waddr   (ct_waddr),
    .ct_wdata   (ct_wdata),
    .mac        (mac),
    .mic        (mic),
    .active     (ctr_active),
    .text_valid (ctr_text_valid),
    .key_valid  (ctr_key_valid),
    .key_reg    (ctr_key_reg)
  );

  assign ct_ra[0] = ct_raddr;
  assign ct_rdata = ct_rd[0];

  ccm_regfile #(.WIDTH(128), .DEPTH(MEM_DEPTH), .NRD(1)) u_ctr_mem (
    .clk   (clk),
    .we    (ct_we),
    .waddr (ct_waddr),
    .wdata (ct_wdata),
    .raddr (ct_ra),
    .rdata (ct_rd)
  );

  // The message must fit the Parser_memory.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (cstate == C_FORMAT) |-> total_block_num <= 16'(MEM_DEPTH));

endmodule
