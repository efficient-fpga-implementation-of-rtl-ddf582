// tb_aes_mixcolumn: FIPS-197 / textbook MixColumns examples plus random
// columns against the reference matrix product.
module tb_aes_mixcolumn;
  import ccm_ref_pkg::*;

  logic [31:0] col_in, col_out;
  int checks = 0, failures = 0;

  aes_mixcolumn dut (.col_in(col_in), .col_out(col_out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] i, logic [31:0] exp);
    col_in = i;
    #1;
    checks++;
    if (col_out !== exp) begin
      failures++;
      $display("FAIL in %h: got %h expected %h", i, col_out, exp);
    end
  endtask

  initial begin
    chk(32'hdb135345, 32'h8e4da1bc);
    chk(32'hf20a225c, 32'h9fdc589d);
    chk(32'h01010101, 32'h01010101);
    chk(32'hd4d4d4d5, 32'hd5d5d7d6);
    chk(32'hd4bf5d30, 32'h046681e5);   // FIPS-197 Appendix B, round 1
    for (int k = 0; k < 200; k++) begin
      logic [31:0] r = $urandom;
      chk(r, ref_mixcol(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
