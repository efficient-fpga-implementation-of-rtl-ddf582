// tb_ccm_formatter: feeds messages with and without associated data, in
// random-rate byte streams, into the formatting function and compares every
// block written to the Parser_memory (B0, length-prefixed and padded
// associated data, padded payload) and parsing_counter with the reference
// formatter. Also checks that dropping do_format in S_NONCE returns the FSM
// to READY without consuming bytes.
module tb_ccm_formatter;
  import ccm_pkg::*;
  import ccm_ref_pkg::*;

  logic         clk = 0, rst_n = 0, do_format_en = 0, force_low = 0;
  logic         do_format;
  logic [95:0]  nonce = '0;
  logic [15:0]  plen = '0, alen = '0, parsing_counter, total = '0;
  logic         head_valid, pop, pm_we;
  logic [7:0]   head_data, pm_addr;
  data_type_t   head_type;
  logic [127:0] pm_wdata;
  logic [8:0]   q[$];
  logic [127:0] got[$];
  bit           stall = 0;
  int checks = 0, failures = 0;

  assign head_valid = (q.size() > 0) && !stall;
  assign head_data  = (q.size() > 0) ? q[0][7:0] : 8'h00;
  assign head_type  = (q.size() > 0) ? data_type_t'(q[0][8]) : T_ASSOCIATE;
  assign do_format  = do_format_en && !force_low && (parsing_counter != total);

  ccm_formatter #(.NONCE_BYTES(12), .TAG_BYTES(16), .AW(8)) dut (
    .clk(clk), .rst_n(rst_n), .do_format(do_format), .nonce(nonce), .plen(plen),
    .alen(alen), .a_flag(alen != 0), .head_valid(head_valid), .head_data(head_data),
    .head_type(head_type), .pop(pop), .pm_we(pm_we), .pm_addr(pm_addr),
    .pm_wdata(pm_wdata), .parsing_counter(parsing_counter));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (pop && head_valid) void'(q.pop_front());
    if (pm_we && rst_n) begin
      got.push_back(pm_wdata);
      checks++;
      if (pm_addr != 8'(got.size() - 1)) begin
        failures++;
        $display("FAIL write address %0d, expected %0d", pm_addr, got.size() - 1);
      end
    end
  end
  always @(negedge clk) stall = ($urandom_range(0, 3) == 0);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int al, int pl);
    bytes_t n, a, p;
    logic [127:0] exp[$];
    for (int i = 0; i < 12; i++) n.push_back(u8'($urandom));
    for (int i = 0; i < al; i++) a.push_back(u8'($urandom));
    for (int i = 0; i < pl; i++) p.push_back(u8'($urandom));
    ref_format(n, a, p, 16, exp);
    foreach (n[i]) nonce[95-8*i -: 8] = n[i];
    plen = 16'(pl); alen = 16'(al); total = 16'(exp.size());
    got = {};
    foreach (a[i]) q.push_back({1'b0, a[i]});
    foreach (p[i]) q.push_back({1'b1, p[i]});
    @(negedge clk);
    do_format_en = 1;
    while (parsing_counter != total) @(negedge clk);
    do_format_en = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (got.size() != exp.size() || q.size() != 0) begin
      failures++;
      $display("FAIL a=%0d p=%0d: %0d blocks written, %0d expected, %0d bytes left",
               al, pl, got.size(), exp.size(), q.size());
    end
    for (int i = 0; i < exp.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] !== exp[i]) begin
        failures++;
        $display("FAIL a=%0d p=%0d block %0d: %h expected %h", al, pl, i, got[i], exp[i]);
      end
    end
    checks++;
    if (parsing_counter != 0) begin failures++; $display("FAIL counter not cleared"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 1); run(0, 16); run(0, 17); run(20, 24); run(14, 16); run(15, 3); run(30, 1);
    for (int i = 0; i < 30; i++) run(int'($urandom_range(0, 70)), int'($urandom_range(1, 100)));
    // Abort: do_format drops while the formatter waits in S_NONCE.
    plen = 16'd5; alen = 16'd0; total = 16'd2; got = {};
    @(negedge clk); do_format_en = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (dut.state != dut.F_S_NONCE) begin failures++; $display("FAIL not waiting in S_NONCE"); end
    force_low = 1;
    @(negedge clk); @(negedge clk);
    checks++;
    if (dut.state != dut.F_READY) begin failures++; $display("FAIL no return to READY"); end
    do_format_en = 0; force_low = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
