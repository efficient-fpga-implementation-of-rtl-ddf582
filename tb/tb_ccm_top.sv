// tb_ccm_top: end-to-end test of the AES-CCM engine at its default
// parameters (AES-128, 12-byte nonce, 16-byte MIC, 256-entry memories).
//
// Messages: the NIST SP 800-38C example with a 12-byte nonce (ciphertext
// compared with the published value, MIC with the reference model), a
// repeated key, random messages with and without associated data, block
// boundary cases, and a 1000-byte payload. Every ciphertext block and MIC is
// compared with ccm_ref_pkg. It also checks 74 cycles per formatted block in
// the AES phase and the 91-cycle key expansion, and counts the mechanisms
// the design has: key expansion, expansion skipped with a saved key,
// associated data present / absent, padded last blocks, host stalls on a
// full Input_register, and counter core idle while CBC-MAC works on
// associated-data blocks. A mechanism never seen counts as a failure.
module tb_ccm_top;
  import ccm_pkg::*;
  import ccm_ref_pkg::*;

  logic         clk = 0, rst_n = 0, i_do_cbc = 0;
  logic [127:0] key = '0;
  logic [95:0]  nonce = '0;
  logic [15:0]  plen = '0, alen = '0;
  logic         in_valid = 0, in_ready;
  logic [7:0]   in_data = '0;
  data_type_t   in_type = T_ASSOCIATE;
  logic         busy, done;
  logic [127:0] mic, ct_rdata;
  logic [7:0]   ct_raddr = '0;

  int checks = 0, failures = 0;
  int n_expd = 0, n_skip = 0, n_aad = 0, n_noaad = 0, n_pad = 0, n_stall = 0, n_ctr_idle = 0;
  longint cycle = 0;

  ccm_top dut (
    .clk(clk), .rst_n(rst_n), .i_do_cbc(i_do_cbc), .key(key), .nonce(nonce),
    .plen(plen), .alen(alen), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .in_type(in_type), .busy(busy), .done(done), .mic(mic),
    .ct_raddr(ct_raddr), .ct_rdata(ct_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism and timing monitors.
  longint t_key = 0, t_aes = 0;
  int     kx_cycles = -1, aes_cycles = -1;
  always @(posedge clk) if (rst_n) begin
    if (dut.do_expd) begin n_expd++; t_key = cycle; end
    if (dut.cstate == C_KEY_EXP && dut.u_ctrl.issued && dut.cbc_key_valid && dut.ctr_key_valid)
      kx_cycles = int'(cycle - t_key);
    if (dut.cstate == C_KEY_EXP && !dut.u_ctrl.issued && !dut.u_ctrl.need_exp) n_skip++;
    if (in_valid && !in_ready) n_stall++;
    if (dut.do_aes_cbc && !dut.do_aes_ctr) n_ctr_idle++;
    if (dut.cstate == C_KEY_EXP) t_aes = cycle + 1;
    if (dut.cstate == C_CBC_DONE) aes_cycles = int'(cycle - t_aes);
  end

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Host byte stream: a queue of {type, byte} drained with valid/ready.
  logic [8:0] txq[$];
  always @(negedge clk) begin
    if (txq.size() > 0) begin
      in_valid = 1'b1;
      in_type  = data_type_t'(txq[0][8]);
      in_data  = txq[0][7:0];
    end else begin
      in_valid = 1'b0;
    end
  end
  always @(posedge clk) if (in_valid && in_ready) void'(txq.pop_front());

  // Run one message; pre_push bytes are written before the start pulse.
  task automatic run_msg(logic [127:0] k, bytes_t n, bytes_t a, bytes_t p,
                         int pre_push, string name);
    bytes_t ct;
    logic [127:0] tag;
    logic [127:0] nv;
    int nblk;
    longint t0;
    ref_ccm(k, n, a, p, TAG_BYTES_TB, ct, tag);
    foreach (n[i]) nv[95-8*i -: 8] = n[i];
    if (a.size() > 0) n_aad++; else n_noaad++;
    if (p.size() % 16 != 0 || (a.size() > 0 && (a.size() + 2) % 16 != 0)) n_pad++;
    @(negedge clk);
    key = k; nonce = nv; plen = 16'(p.size()); alen = 16'(a.size());
    foreach (a[i]) txq.push_back({1'b0, a[i]});
    foreach (p[i]) txq.push_back({1'b1, p[i]});
    if (pre_push > 0) repeat (pre_push) @(negedge clk);
    i_do_cbc = 1;
    t0 = cycle;
    @(negedge clk);
    i_do_cbc = 0;
    key = '0; nonce = '0; plen = '0; alen = '0;   // captured at start
    while (!done) @(negedge clk);
    // Delay budget of one message: 565.5 us at a 166.2 MHz clock.
    checks++;
    if (cycle - t0 > 93986) begin failures++; $display("FAIL %s: over the delay budget", name); end
    @(negedge clk);
    $display("%s: %0d cycles from start to done (%0d in the AES phase)", name, cycle - t0 - 1, aes_cycles);
    checks++;
    if (txq.size() != 0) begin failures++; $display("FAIL %s: bytes left", name); end
    checks++;
    if (aes_cycles != 74 * (1 + (a.size() > 0 ? (a.size() + 17) / 16 : 0) + (p.size() + 15) / 16)) begin
      failures++;
      $display("FAIL %s: AES phase took %0d cycles", name, aes_cycles);
    end
    chk(mic, tag, {name, " MIC"});
    nblk = (p.size() + 15) / 16;
    for (int b = 0; b < nblk; b++) begin
      logic [127:0] e = '0;
      for (int i = 0; i < 16; i++)
        if (16*b + i < ct.size()) e[127-8*i -: 8] = ct[16*b+i];
      ct_raddr = 8'(b);
      #1;
      chk(ct_rdata, e, $sformatf("%s ciphertext block %0d", name, b));
    end
  endtask

  localparam int TAG_BYTES_TB = 16;

  function automatic bytes_t seq(int first, int len);
    bytes_t q;
    for (int i = 0; i < len; i++) q.push_back(u8'(first + i));
    return q;
  endfunction

  function automatic bytes_t rnd(int len);
    bytes_t q;
    for (int i = 0; i < len; i++) q.push_back(u8'($urandom));
    return q;
  endfunction

  initial begin
    logic [127:0] k1 = 128'h404142434445464748494a4b4c4d4e4f;
    bytes_t ct;
    logic [127:0] tag;
    bytes_t n12;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Reference model against the published example (8-byte tag).
    n12 = seq(8'h10, 12);
    ref_ccm(k1, n12, seq(0, 20), seq(8'h20, 24), 8, ct, tag);
    chk(tag, {64'h484392fbc1b09951, 64'h0}, "reference model, SP 800-38C example 3 tag");
    begin
      logic [191:0] c = '0;
      foreach (ct[i]) c[191-8*i -: 8] = ct[i];
      chk(128'(c[191:64]), 128'he3b201a9f5b71a7a9b1ceaeccd97e70b, "reference model ciphertext");
    end

    // Example 3 through the design (ciphertext is independent of tag size).
    run_msg(k1, n12, seq(0, 20), seq(8'h20, 24), 4, "example3");
    ct_raddr = 0; #1; chk(ct_rdata, 128'he3b201a9f5b71a7a9b1ceaeccd97e70b, "example3 block 0 published");
    ct_raddr = 1; #1; chk(ct_rdata, {64'h6176aad9a4428aa5, 64'h0}, "example3 block 1 published");
    checks++;
    if (kx_cycles != 91) begin failures++; $display("FAIL key expansion %0d cycles", kx_cycles); end

    // Same key: the saved key tables are reused.
    run_msg(k1, rnd(12), rnd(0), rnd(16), 0, "same key, no AAD, one block");
    run_msg(k1, rnd(12), rnd(14), rnd(1), 2, "AAD exactly one block, 1-byte payload");

    // New keys, random shapes.
    for (int m = 0; m < 6; m++) begin
      automatic logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      automatic int al = (m % 2 == 0) ? 0 : int'($urandom_range(1, 60));
      automatic int pl = int'($urandom_range(1, 90));
      run_msg(k, rnd(12), rnd(al), rnd(pl), int'($urandom_range(0, 30)), $sformatf("random %0d", m));
    end

    // Workload: a 1-byte payload with a new key.
    run_msg(128'h0f0e0d0c0b0a09080706050403020100, rnd(12), rnd(0), rnd(1), 0, "1-byte payload, new key");

    // Workload: 1000-byte payload, bytes written ahead of the start so the
    // Input_register fills and stalls the host.
    run_msg(k1, rnd(12), rnd(0), rnd(1000), 300, "1000-byte payload");
    run_msg(k1, rnd(12), rnd(32), rnd(1000), 300, "1000-byte payload with AAD");

    checks += 6;
    if (n_expd == 0)     begin failures++; $display("FAIL no key expansion"); end
    if (n_skip == 0)     begin failures++; $display("FAIL no key expansion skipped"); end
    if (n_aad == 0 || n_noaad == 0) begin failures++; $display("FAIL AAD paths"); end
    if (n_pad == 0)      begin failures++; $display("FAIL no padded block"); end
    if (n_stall == 0)    begin failures++; $display("FAIL no input stall"); end
    if (n_ctr_idle == 0) begin failures++; $display("FAIL counter never idle"); end
    $display("mechanisms: expansions=%0d skipped=%0d aad=%0d no_aad=%0d padded=%0d stall_cycles=%0d ctr_idle=%0d",
             n_expd, n_skip, n_aad, n_noaad, n_pad, n_stall, n_ctr_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
