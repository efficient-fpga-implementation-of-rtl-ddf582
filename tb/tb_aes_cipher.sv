// tb_aes_cipher: FIPS-197 vectors and random blocks against the reference
// AES; checks the 73-cycle block latency and the 91-cycle key expansion,
// encryption with a saved key table (do_aes without do_expd), and that
// do_aes is ignored while no key table is valid.
module tb_aes_cipher;
  import ccm_pkg::*;
  import ccm_ref_pkg::*;

  logic         clk = 0, rst_n = 0, do_expd = 0, do_aes = 0;
  logic [127:0] key_in = '0, text_in = '0, text_out, key_reg;
  logic         text_valid, key_valid, ready;
  int checks = 0, failures = 0;

  aes_cipher dut (
    .clk(clk), .rst_n(rst_n), .do_expd(do_expd), .do_aes(do_aes),
    .key_in(key_in), .text_in(text_in), .text_out(text_out),
    .text_valid(text_valid), .key_valid(key_valid), .key_reg(key_reg), .ready(ready));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    key_in = k; do_expd = 1;
    @(negedge clk);
    do_expd = 0; key_in = '0;
    n = 1;
    while (!key_valid) begin @(negedge clk); n++; end
    chk(128'(n), 128'(KEY_EXP_CYCLES), "key expansion cycles");
  endtask

  task automatic encrypt(logic [127:0] pt, logic [127:0] exp);
    int n = 0;
    @(negedge clk);
    text_in = pt; do_aes = 1;
    @(negedge clk);
    do_aes = 0; text_in = '0;
    n = 1;
    while (!text_valid) begin @(negedge clk); n++; end
    chk(128'(n + 1), 128'(AES_BLOCK_CYCLES), "block cycles");
    chk(text_out, exp, "ciphertext");
  endtask

  initial begin
    logic [127:0] k;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // No key yet: do_aes must be ignored.
    @(negedge clk); do_aes = 1; text_in = 128'h1; @(negedge clk); do_aes = 0;
    repeat (100) begin
      @(negedge clk);
      if (text_valid) begin failures++; $display("FAIL encryption without a key"); end
    end
    checks++;
    expand(128'h000102030405060708090a0b0c0d0e0f);
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32);
    // Saved key table: several blocks with one expansion.
    for (int i = 0; i < 4; i++) begin
      automatic logic [127:0] p = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, ref_aes(128'h2b7e151628aed2a6abf7158809cf4f3c, p));
    end
    for (int j = 0; j < 4; j++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      expand(k);
      for (int i = 0; i < 3; i++) begin
        automatic logic [127:0] p = {$urandom, $urandom, $urandom, $urandom};
        encrypt(p, ref_aes(k, p));
      end
    end
    // do_aes in the same cycle as the expansion finishes waiting in KEY.
    @(negedge clk); key_in = 128'h000102030405060708090a0b0c0d0e0f; do_expd = 1;
    @(negedge clk); do_expd = 0; text_in = 128'h00112233445566778899aabbccddeeff; do_aes = 1;
    while (!text_valid) @(negedge clk);
    do_aes = 0;
    chk(text_out, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "do_aes held through KEY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
