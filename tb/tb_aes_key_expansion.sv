// tb_aes_key_expansion: expands the FIPS-197 Appendix A.1 key and random
// keys, compares all eleven stored round keys with the reference schedule,
// and checks the 9-cycle round (91 cycles from start to done).
module tb_aes_key_expansion;
  import ccm_pkg::*;
  import ccm_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [127:0] key_in = '0;
  logic [7:0]  sbox_addr;
  logic [31:0] sbox_data;
  logic        busy, done;
  logic [3:0]  rd_idx = '0;
  logic [127:0] rd_key, key_reg;
  int checks = 0, failures = 0;

  aes_key_expansion dut (
    .clk(clk), .rst_n(rst_n), .start(start), .key_in(key_in),
    .sbox_addr(sbox_addr), .sbox_data(sbox_data[7:0]), .busy(busy), .done(done),
    .rd_idx(rd_idx), .rd_key(rd_key), .key_reg(key_reg));

  aes_sbox #(.LANES(4)) u_sbox (.clk(clk), .addr({24'h0, sbox_addr}), .data(sbox_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic expand(logic [127:0] k);
    int n = 0;
    @(negedge clk);
    key_in = k;
    start  = 1;
    @(negedge clk);
    start  = 0;
    key_in = '1;           // key must have been captured
    n = 1;
    while (!done) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != int'(KEY_EXP_CYCLES)) begin
      failures++;
      $display("FAIL expansion took %0d cycles, expected %0d", n, KEY_EXP_CYCLES);
    end
    for (int r = 0; r <= 10; r++) begin
      rd_idx = 4'(r);
      #1;
      chk(rd_key, ref_round_key(k, r), $sformatf("round key %0d", r));
    end
    chk(key_reg, k, "AES_KEY register");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    rd_idx = 4'd1;  #1; chk(rd_key, 128'ha0fafe1788542cb123a339392a6c7605, "FIPS round 1");
    rd_idx = 4'd10; #1; chk(rd_key, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS round 10");
    for (int k = 0; k < 5; k++) expand({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
