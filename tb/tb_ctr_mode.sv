// tb_ctr_mode: drives the counter module as the controller does (one
// do_aes per CBC-MAC block, more requests than counter blocks) and compares
// every ciphertext write (address, data, zeroed tail bytes) and the MIC
// (MAC ^ S0, cut to the tag length) with the reference; checks that no
// encryption starts once all counter blocks are used.
module tb_ctr_mode;
  import ccm_pkg::*;
  import ccm_ref_pkg::*;

  logic         clk = 0, rst_n = 0, init = 0, do_expd = 0, do_aes = 0;
  logic [127:0] key_in = '0, mac = '0, mic, key_reg, ct_wdata;
  logic [95:0]  nonce = '0;
  logic [15:0]  pay_blocks = '0;
  logic [4:0]   last_bytes = 5'd16;
  logic [7:0]   pay_base = '0, pay_raddr, ct_waddr;
  logic [127:0] pay_rdata;
  logic         ct_we, active, text_valid, key_valid;
  logic [127:0] pmem [256];
  logic [127:0] cmem [256];
  int checks = 0, failures = 0, writes = 0;

  assign pay_rdata = pmem[pay_raddr];

  ctr_mode #(.NONCE_BYTES(12), .TAG_BYTES(8), .AW(8)) dut (
    .clk(clk), .rst_n(rst_n), .init(init), .do_expd(do_expd), .do_aes(do_aes),
    .key_in(key_in), .nonce(nonce), .pay_blocks(pay_blocks), .last_bytes(last_bytes),
    .pay_base(pay_base), .pay_raddr(pay_raddr), .pay_rdata(pay_rdata), .ct_we(ct_we),
    .ct_waddr(ct_waddr), .ct_wdata(ct_wdata), .mac(mac), .mic(mic), .active(active),
    .text_valid(text_valid), .key_valid(key_valid), .key_reg(key_reg));

  always #5 clk = ~clk;
  always @(posedge clk) if (ct_we) begin cmem[ct_waddr] <= ct_wdata; writes++; end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 6; m++) begin
      automatic logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      automatic int pl = int'($urandom_range(1, 100));
      automatic int extra = int'($urandom_range(0, 3));
      automatic bytes_t n, p;
      automatic logic [127:0] s0;
      for (int i = 0; i < 12; i++) n.push_back(u8'($urandom));
      for (int i = 0; i < pl; i++) p.push_back(u8'($urandom));
      foreach (n[i]) nonce[95-8*i -: 8] = n[i];
      pay_blocks = 16'((pl + 15) / 16);
      last_bytes = 5'((pl % 16 == 0) ? 16 : pl % 16);
      pay_base = 8'($urandom_range(1, 20));
      for (int b = 0; b < 256; b++) pmem[b] = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < pl; i++) pmem[pay_base + 8'(i / 16)][127-8*(i%16) -: 8] = p[i];
      for (int i = pl; i < 16 * int'(pay_blocks); i++) pmem[pay_base + 8'(i / 16)][127-8*(i%16) -: 8] = 0;
      writes = 0;
      @(negedge clk); key_in = k; do_expd = 1; init = 1;
      @(negedge clk); do_expd = 0; init = 0;
      while (!key_valid) @(negedge clk);
      for (int r = 0; r < int'(pay_blocks) + 1 + extra; r++) begin
        do_aes = 1;
        @(negedge clk);
        do_aes = 0;
        repeat (80) @(negedge clk);
      end
      checks++;
      if (writes != int'(pay_blocks) || active) begin
        failures++;
        $display("FAIL %0d writes for %0d blocks, active=%b", writes, pay_blocks, active);
      end
      for (int b = 0; b < int'(pay_blocks); b++) begin
        automatic logic [127:0] s = ref_aes(k, ref_ctr_block(n, b + 1));
        automatic logic [127:0] e = '0;
        for (int i = 0; i < 16; i++)
          if (16*b + i < pl) e[127-8*i -: 8] = p[16*b+i] ^ s[127-8*i -: 8];
        checks++;
        if (cmem[b] !== e) begin failures++; $display("FAIL msg %0d block %0d: %h vs %h", m, b, cmem[b], e); end
      end
      mac = {$urandom, $urandom, $urandom, $urandom};
      s0 = ref_aes(k, ref_ctr_block(n, 0));
      #1;
      checks++;
      if (mic !== {64'((mac ^ s0) >> 64), 64'h0}) begin failures++; $display("FAIL MIC %h", mic); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
