// ccm_regfile: on-chip register file used for the Parser_memory (formatted
// blocks) and the Ctr_memory (ciphertext blocks) of the AES-CCM engine.
//
// One synchronous write port and NRD combinational read ports. Keeping the
// formatted input and the processed output in on-chip registers, rather than
// in external memory, follows the source design (128 bits x 256 entries for
// both memories); the port structure is this design's choice: the formatter
// writes, CBC-MAC and counter read in parallel, the host reads results.
module ccm_regfile #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned NRD   = 2,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr [NRD],
  output logic [WIDTH-1:0] rdata [NRD]
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < int'(NRD); i++) rdata[i] = mem[raddr[i]];
  end

endmodule
