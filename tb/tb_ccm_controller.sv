// tb_ccm_controller: runs the CCM controller against behavioural stand-ins
// for the formatter (one block every three cycles of do_format) and the two
// AES cores (91-cycle key expansion, text_valid 72 cycles after do_aes). It
// checks the state order READY, FORMAT, KEY_EXP, DO_AES, NEXT_DATA,
// CBC_DONE; that i_do_cbc with Plen = 0 is ignored; one do_aes per
// formatted block on the CBC-MAC side and pay_blocks + 1 on the counter
// side; first only with block 0; a key expansion for a new key and none for
// a key already expanded; and one done pulse per message.
module tb_ccm_controller;
  import ccm_pkg::*;

  logic         clk = 0, rst_n = 0, i_do_cbc = 0;
  logic [15:0]  plen_in = '0, total_block_num = '0, parsing_counter = '0;
  logic [127:0] key_q = '0, kreg = '0;
  logic         kvalid = 0, cbc_tv = 0, ctr_tv = 0;
  logic [15:0]  ctr_j = '0, pay_blocks = '0;
  logic         ctr_active;
  logic         load, do_format, do_expd, do_aes_cbc, do_aes_ctr, first, busy, done;
  logic [15:0]  enc_block_counter;
  ccm_state_t   state, prev_state;
  int checks = 0, failures = 0;
  int n_cbc = 0, n_ctr = 0, n_expd = 0, n_done = 0, n_first = 0, bad_order = 0;

  assign ctr_active = (ctr_j <= pay_blocks);

  ccm_controller dut (
    .clk(clk), .rst_n(rst_n), .i_do_cbc(i_do_cbc), .plen_in(plen_in), .key_q(key_q),
    .total_block_num(total_block_num), .parsing_counter(parsing_counter),
    .cbc_key_valid(kvalid), .ctr_key_valid(kvalid), .cbc_key_reg(kreg), .ctr_key_reg(kreg),
    .cbc_text_valid(cbc_tv), .ctr_text_valid(ctr_tv), .ctr_active(ctr_active),
    .load(load), .do_format(do_format), .do_expd(do_expd), .do_aes_cbc(do_aes_cbc),
    .do_aes_ctr(do_aes_ctr), .first(first), .enc_block_counter(enc_block_counter),
    .busy(busy), .done(done), .state(state));

  always #5 clk = ~clk;

  // Stand-ins for the formatter and the AES cores.
  int fmt_t = 0, kx_t = -1, aes_t = -1;
  logic aes_ctr_pending = 0;
  always @(posedge clk) begin
    cbc_tv <= 1'b0;
    ctr_tv <= 1'b0;
    if (load) ctr_j <= '0;
    if (do_format) begin
      fmt_t++;
      if (fmt_t % 3 == 0) parsing_counter <= parsing_counter + 1;
    end else if (state == C_READY) parsing_counter <= '0;
    if (do_expd) begin kvalid <= 1'b0; kreg <= key_q; kx_t = 0; n_expd++; end
    else if (kx_t >= 0) begin kx_t++; if (kx_t == 90) begin kvalid <= 1'b1; kx_t = -1; end end
    if (do_aes_cbc) begin
      aes_t = 0; aes_ctr_pending = do_aes_ctr; n_cbc++; if (do_aes_ctr) n_ctr++;
      if (first) n_first++;
      if (first != (enc_block_counter == 0)) bad_order++;
    end else if (aes_t >= 0) begin
      aes_t++;
      if (aes_t == 71) begin
        cbc_tv <= 1'b1; ctr_tv <= aes_ctr_pending;
        if (aes_ctr_pending) ctr_j <= ctr_j + 1;
        aes_t = -1;
      end
    end
    if (done) n_done++;
    // Allowed transitions of the controller.
    if (state != prev_state && rst_n) begin
      if (!((prev_state == C_READY && state == C_FORMAT) ||
            (prev_state == C_FORMAT && state == C_KEY_EXP) ||
            (prev_state == C_KEY_EXP && state == C_DO_AES) ||
            (prev_state == C_DO_AES && state == C_NEXT_DATA) ||
            (prev_state == C_NEXT_DATA && (state == C_DO_AES || state == C_CBC_DONE)) ||
            (prev_state == C_CBC_DONE && state == C_READY))) begin
        bad_order++;
        $display("FAIL transition %s -> %s", prev_state.name(), state.name());
      end
    end
    prev_state <= state;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic msg(logic [127:0] k, int tot, int pay, bit expect_expd);
    int e0 = n_expd, c0 = n_cbc, t0 = n_ctr, d0 = n_done;
    @(negedge clk);
    key_q = k; plen_in = 16'(pay * 16); total_block_num = 16'(tot); pay_blocks = 16'(pay);
    i_do_cbc = 1;
    @(negedge clk);
    i_do_cbc = 0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (n_cbc - c0 != tot || n_ctr - t0 != pay + 1 || n_done - d0 != 1 ||
        (n_expd - e0) != int'(expect_expd) || busy) begin
      failures++;
      $display("FAIL msg tot=%0d pay=%0d: cbc=%0d ctr=%0d done=%0d expd=%0d busy=%b",
               tot, pay, n_cbc - c0, n_ctr - t0, n_done - d0, n_expd - e0, busy);
    end
  endtask

  initial begin
    prev_state = C_READY;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Plen = 0 is not started.
    @(negedge clk); plen_in = 0; i_do_cbc = 1; @(negedge clk); i_do_cbc = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (state != C_READY) begin failures++; $display("FAIL started with Plen = 0"); end
    msg(128'h1111, 3, 2, 1);
    msg(128'h1111, 5, 2, 0);     // two associated-data blocks, same key
    msg(128'h2222, 2, 1, 1);
    msg(128'h2222, 9, 8, 0);
    msg(128'h3333, 4, 1, 1);
    checks++;
    if (bad_order != 0 || n_first != 5) begin
      failures++;
      $display("FAIL order errors %0d, first flags %0d", bad_order, n_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
