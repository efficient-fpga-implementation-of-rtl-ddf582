// tb_ccm_data_length: block counts for boundary and random lengths against
// the SP 800-38C formulas, and that the lengths are held between loads.
module tb_ccm_data_length;
  logic        clk = 0, rst_n = 0, load = 0;
  logic [15:0] plen_in = '0, alen_in = '0;
  logic [15:0] plen, alen, aad_blocks, pay_blocks, total_block_num;
  logic        a_flag;
  logic [4:0]  last_bytes;
  int checks = 0, failures = 0;

  ccm_data_length dut (
    .clk(clk), .rst_n(rst_n), .load(load), .plen_in(plen_in), .alen_in(alen_in),
    .plen(plen), .alen(alen), .a_flag(a_flag), .aad_blocks(aad_blocks),
    .pay_blocks(pay_blocks), .total_block_num(total_block_num), .last_bytes(last_bytes));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(int p, int a);
    int ea = (a == 0) ? 0 : (a + 2 + 15) / 16;
    int ep = (p + 15) / 16;
    int el = (p % 16 == 0) ? 16 : p % 16;
    @(negedge clk);
    plen_in = 16'(p); alen_in = 16'(a); load = 1;
    @(negedge clk);
    load = 0; plen_in = 16'hffff; alen_in = 16'hffff;
    @(negedge clk);
    checks++;
    if (plen != 16'(p) || alen != 16'(a) || a_flag != (a != 0) || aad_blocks != 16'(ea) ||
        pay_blocks != 16'(ep) || total_block_num != 16'(1 + ea + ep) || last_bytes != 5'(el)) begin
      failures++;
      $display("FAIL p=%0d a=%0d: %0d %0d %0d %0d last %0d", p, a, aad_blocks, pay_blocks,
               total_block_num, a_flag, last_bytes);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    try(1, 0); try(16, 0); try(17, 0); try(24, 20); try(1, 14); try(1, 15);
    try(1000, 0); try(4064, 0); try(32, 30); try(5, 1);
    for (int i = 0; i < 200; i++) try(int'($urandom_range(1, 4000)), int'($urandom_range(0, 300)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
