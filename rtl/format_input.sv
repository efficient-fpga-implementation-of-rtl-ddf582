// format_input: the Input_register, an 8-bit x 256 on-chip buffer that
// receives the associated data and payload bytes from the host and hands
// them to the formatting function in order.
//
// Host side: in_valid / in_ready handshake, one byte and its type tag
// (T_ASSOCIATE or T_PAYLOAD) per accepted cycle; in_ready is low while the
// buffer is full, which stalls the host. Formatter side: head_valid,
// head_data and head_type show the oldest byte; pop removes it. A push and a
// pop may happen in the same cycle. The buffer size follows the source
// design; organising it as a first-in first-out queue with a one-bit type
// tag beside each byte is this design's choice, so messages longer than the
// buffer can stream through it.
module format_input
  import ccm_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  byte_t      in_data,
  input  data_type_t in_type,
  output logic       head_valid,
  output byte_t      head_data,
  output data_type_t head_type,
  input  logic       pop
);

  byte_t      mem  [DEPTH];
  data_type_t tmem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;
  logic          push, do_pop;

  assign in_ready   = (count != (AW+1)'(DEPTH));
  assign head_valid = (count != '0);
  assign head_data  = mem[rptr];
  assign head_type  = tmem[rptr];
  assign push       = in_valid && in_ready;
  assign do_pop     = pop && head_valid;

  always_ff @(posedge clk) begin
    if (push) begin
      mem[wptr]  <= in_data;
      tmem[wptr] <= in_type;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push)   wptr <= wptr + 1'b1;
      if (do_pop) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(do_pop);
    end
  end

  // A pop of an empty buffer is a protocol error of the formatter.
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
