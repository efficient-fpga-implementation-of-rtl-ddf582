// tb_cbc_mac: chains random formatted blocks through the CBC-MAC with
// random keys and compares the MAC Data register with the reference chain
// Y1 = AES(B0), Yi+1 = AES(Bi ^ Yi); also checks 73 cycles per block.
module tb_cbc_mac;
  import ccm_pkg::*;
  import ccm_ref_pkg::*;

  logic         clk = 0, rst_n = 0, do_expd = 0, do_aes = 0, first = 0;
  logic [127:0] key_in = '0, block_in = '0, mac, key_reg;
  logic         text_valid, key_valid;
  int checks = 0, failures = 0;

  cbc_mac dut (
    .clk(clk), .rst_n(rst_n), .do_expd(do_expd), .do_aes(do_aes), .first(first),
    .key_in(key_in), .block_in(block_in), .mac(mac), .text_valid(text_valid),
    .key_valid(key_valid), .key_reg(key_reg));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 5; m++) begin
      automatic logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] y = '0;
      automatic int nb = int'($urandom_range(1, 6));
      @(negedge clk); key_in = k; do_expd = 1;
      @(negedge clk); do_expd = 0;
      while (!key_valid) @(negedge clk);
      for (int b = 0; b < nb; b++) begin
        automatic logic [127:0] blk = {$urandom, $urandom, $urandom, $urandom};
        automatic int n = 1;
        y = ref_aes(k, (b == 0) ? blk : (blk ^ y));
        block_in = blk; first = (b == 0); do_aes = 1;
        @(negedge clk);
        do_aes = 0; block_in = '0;
        while (!text_valid) begin @(negedge clk); n++; end
        checks++;
        if (n + 1 != int'(AES_BLOCK_CYCLES)) begin failures++; $display("FAIL %0d cycles", n + 1); end
        @(negedge clk);
        checks++;
        if (mac !== y) begin failures++; $display("FAIL msg %0d block %0d: %h vs %h", m, b, mac, y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
