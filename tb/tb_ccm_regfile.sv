// tb_ccm_regfile: writes random words to random addresses of a 128 x 256
// register file and checks both read ports against a model array,
// including reads of an address written in the same cycle (old value until
// the edge).
module tb_ccm_regfile;
  logic         clk = 0, we = 0;
  logic [7:0]   waddr = '0;
  logic [127:0] wdata = '0;
  logic [7:0]   raddr [2];
  logic [127:0] rdata [2];
  logic [127:0] model [256];
  bit           written [256];
  int checks = 0, failures = 0;

  ccm_regfile #(.WIDTH(128), .DEPTH(256), .NRD(2)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr[0] = '0; raddr[1] = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = {$urandom, $urandom, $urandom, $urandom};
      model[i] = wdata; written[i] = 1;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      waddr = 8'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      raddr[0] = 8'($urandom);
      raddr[1] = (t % 4 == 0) ? waddr : 8'($urandom);
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++;
          $display("FAIL port %0d addr %0d: %h vs %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
