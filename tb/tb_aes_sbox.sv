// tb_aes_sbox: checks all 256 entries on every lane against a reference
// S-box built by inverse search, a few FIPS-197 values, and the one-cycle
// registered read.
module tb_aes_sbox;
  import ccm_ref_pkg::*;

  logic        clk = 0;
  logic [31:0] addr = '0;
  logic [31:0] data;
  int checks = 0, failures = 0;

  aes_sbox #(.LANES(4)) dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      u8 a0 = u8'(i), a1 = u8'(255 - i), a2 = u8'(i * 7 + 3), a3 = u8'(i ^ 8'h5a);
      addr = {a3, a2, a1, a0};
      @(negedge clk);
      chk(data, {ref_sbox(a3), ref_sbox(a2), ref_sbox(a1), ref_sbox(a0)}, $sformatf("entry %0d", i));
    end
    // FIPS-197 known values.
    addr = 32'h00_01_53_ff;
    @(negedge clk);
    chk(data, 32'h63_7c_ed_16, "fips values");
    // Registered read: data must not follow addr until the next edge.
    addr = 32'h00000000;
    #1;
    chk(data, 32'h63_7c_ed_16, "registered read holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
