// tb_format_input: pushes random bytes with random type tags through the
// 256-entry Input_register with random push and pop rates, compares the
// output order with a model queue, and checks that in_ready drops exactly
// when 256 bytes are held (host stall) and head_valid when it is empty.
module tb_format_input;
  import ccm_pkg::*;

  logic       clk = 0, rst_n = 0, in_valid = 0, pop = 0;
  logic       in_ready, head_valid;
  logic [7:0] in_data = '0, head_data;
  data_type_t in_type = T_ASSOCIATE, head_type;
  logic [8:0] model[$];
  int checks = 0, failures = 0, full_seen = 0;

  format_input #(.DEPTH(256)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .in_type(in_type), .head_valid(head_valid),
    .head_data(head_data), .head_type(head_type), .pop(pop));

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
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      // Phase 1 fills the buffer, phase 2 mixes, phase 3 drains.
      in_valid = (t < 400) ? 1'b1 : (t < 4000) ? ($urandom_range(0, 1) == 1) : 1'b0;
      in_data  = 8'($urandom);
      in_type  = data_type_t'($urandom_range(0, 1));
      pop      = (t < 400) ? 1'b0 : head_valid && ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (in_ready !== (model.size() < 256) || head_valid !== (model.size() > 0)) begin
        failures++;
        $display("FAIL flags at t=%0d: ready=%b valid=%b size=%0d", t, in_ready, head_valid, model.size());
      end
      if (!in_ready) full_seen++;
      if (head_valid) begin
        checks++;
        if ({head_type, head_data} !== model[0]) begin
          failures++;
          $display("FAIL head %h expected %h", {head_type, head_data}, model[0]);
        end
      end
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back({in_type, in_data});
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
