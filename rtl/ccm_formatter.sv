// ccm_formatter: the CCM formatting function. It turns the nonce, the
// lengths and the byte stream from the Input_register into the 128-bit
// blocks B0, B1, ... of NIST SP 800-38C and writes them, in order, into the
// Parser_memory.
//
// States (as in the source design's formatting FSM):
//   READY        wait for do_format (a new request needs do_format to have
//                been low in READY since the last message)
//   FIRST_BLOCK  build the flag octet: Adata bit, (TAG_BYTES-2)/2, q-1
//   S_NONCE      write B0 = flags | nonce | Plen (q = 15 - NONCE_BYTES bytes);
//                then go to ASSOCIATE if A_flag and the next byte is
//                T_ASSOCIATE, or to PAYLOAD if !A_flag and it is T_PAYLOAD
//   ASSOCIATE    pack associated data, behind its 2-byte length, into
//                blocks; when the next byte is T_PAYLOAD, zero-pad and write
//                the partial block and go to PAYLOAD
//   PAYLOAD      pack payload bytes while the remaining Plen is not 0; then
//                write the zero-padded partial block and return to READY
// FIRST_BLOCK and S_NONCE return to READY if do_format drops.
//
// One byte is consumed per cycle when available. Block writes are
// registered: pm_we pulses one cycle after the block's last byte, and
// parsing_counter counts completed writes (it increments with the write and
// is cleared in READY while do_format is low). The state sequence and its
// conditions follow the source design; the one-byte-per-cycle packing and
// the write timing are this design's choices.
module ccm_formatter
  import ccm_pkg::*;
#(
  parameter int unsigned NONCE_BYTES = 12,
  parameter int unsigned TAG_BYTES   = 16,
  parameter int unsigned AW          = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     do_format,
  input  logic [8*NONCE_BYTES-1:0] nonce,
  input  logic [15:0]              plen,
  input  logic [15:0]              alen,
  input  logic                     a_flag,
  input  logic                     head_valid,
  input  byte_t                    head_data,
  input  data_type_t               head_type,
  output logic                     pop,
  output logic                     pm_we,
  output logic [AW-1:0]            pm_addr,
  output block_t                   pm_wdata,
  output logic [15:0]              parsing_counter
);

  localparam int unsigned Q = 15 - NONCE_BYTES;

  typedef enum logic [2:0] {
    F_READY, F_FIRST_BLOCK, F_S_NONCE, F_ASSOCIATE, F_PAYLOAD
  } fstate_t;

  fstate_t     state;
  byte_t       flag_octet;
  block_t      buf_q;        // block being packed
  logic [4:0]  cnt;          // bytes in buf_q
  logic [15:0] plen_rem;
  logic        armed;
  logic        b0_done;
  logic        take;         // consume head byte this cycle
  block_t      buf_next;
  logic [8*Q-1:0] q_field;

  assign q_field = (8*Q)'(plen);

  always_comb begin
    take = 1'b0;
    unique case (state)
      F_ASSOCIATE: take = head_valid && head_type == T_ASSOCIATE;
      F_PAYLOAD:   take = head_valid && plen_rem != '0;
      default:     take = 1'b0;
    endcase
  end
  assign pop = take;

  always_comb begin
    buf_next = buf_q;
    buf_next[127 - 8*cnt[3:0] -: 8] = head_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= F_READY;
      armed           <= 1'b0;
      b0_done         <= 1'b0;
      cnt             <= '0;
      plen_rem        <= '0;
      pm_we           <= 1'b0;
      pm_addr         <= '0;
      parsing_counter <= '0;
    end else begin
      pm_we <= 1'b0;
      if (pm_we) begin
        parsing_counter <= parsing_counter + 16'd1;
        pm_addr         <= pm_addr + 1'b1;
      end
      unique case (state)
        F_READY: begin
          if (!do_format) begin
            armed           <= 1'b1;
            parsing_counter <= '0;
            pm_addr         <= '0;
          end else if (armed) begin
            armed    <= 1'b0;
            state    <= F_FIRST_BLOCK;
            plen_rem <= plen;
            cnt      <= '0;
            b0_done  <= 1'b0;
          end
        end
        F_FIRST_BLOCK: begin
          flag_octet <= {1'b0, a_flag, 3'((TAG_BYTES - 2) / 2), 3'(Q - 1)};
          state      <= do_format ? F_S_NONCE : F_READY;
        end
        F_S_NONCE: begin
          if (!b0_done) begin
            pm_we    <= 1'b1;
            pm_wdata <= {flag_octet, nonce, q_field};
            b0_done  <= 1'b1;
          end
          if (!do_format) begin
            state <= F_READY;
          end else if (b0_done && head_valid) begin
            if (a_flag && head_type == T_ASSOCIATE) begin
              state <= F_ASSOCIATE;
              buf_q <= {alen, 112'h0};
              cnt   <= 5'd2;
            end else if (!a_flag && head_type == T_PAYLOAD) begin
              state <= F_PAYLOAD;
              buf_q <= '0;
              cnt   <= 5'd0;
            end
          end
        end
        F_ASSOCIATE: begin
          if (take) begin
            if (cnt == 5'd15) begin
              pm_we    <= 1'b1;
              pm_wdata <= buf_next;
              buf_q    <= '0;
              cnt      <= '0;
            end else begin
              buf_q <= buf_next;
              cnt   <= cnt + 5'd1;
            end
          end else if (head_valid && head_type == T_PAYLOAD) begin
            if (cnt != '0) begin
              pm_we    <= 1'b1;
              pm_wdata <= buf_q;
            end
            buf_q <= '0;
            cnt   <= '0;
            state <= F_PAYLOAD;
          end
        end
        F_PAYLOAD: begin
          if (plen_rem == '0) begin
            if (cnt != '0) begin
              pm_we    <= 1'b1;
              pm_wdata <= buf_q;
            end
            cnt   <= '0;
            state <= F_READY;
          end else if (take) begin
            plen_rem <= plen_rem - 16'd1;
            if (cnt == 5'd15) begin
              pm_we    <= 1'b1;
              pm_wdata <= buf_next;
              buf_q    <= '0;
              cnt      <= '0;
            end else begin
              buf_q <= buf_next;
              cnt   <= cnt + 5'd1;
            end
          end
        end
        default: state <= F_READY;
      endcase
    end
  end

  // The formatter never consumes an associated-data byte as payload.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == F_PAYLOAD && take) |-> head_type == T_PAYLOAD);

endmodule
