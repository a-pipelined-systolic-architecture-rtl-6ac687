// tb_adder_tree: random input sets with random gaps; each sum and tag must
// appear exactly 4 cycles after its inputs (one per tree level), in order.
module tb_adder_tree;
  import horb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [9:0] in_tag = 0, out_tag;
  pix_t ad [16];
  logic [11:0] sum;
  int exp_sum [$], exp_tag [$], exp_cyc [$];
  int cyc = 0, checks = 0, failures = 0, sent = 0;

  adder_tree dut (.*);

  int s, t, c;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      checks++;
      if (exp_sum.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        s = exp_sum.pop_front(); t = exp_tag.pop_front(); c = exp_cyc.pop_front();
        if (int'(sum) != s || int'(out_tag) != t || cyc - c != 4) begin
          failures++; $display("FAIL sum %0d exp %0d tag %0d exp %0d latency %0d", sum, s, out_tag, t, cyc - c);
        end
      end
    end
  end

  initial begin
    for (int j = 0; j < 16; j++) ad[j] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      in_valid = (it % 5 != 3);
      in_tag = 10'($urandom);
      for (int j = 0; j < 16; j++) ad[j] = (it < 5) ? 8'd255 : pix_t'($urandom);
      if (in_valid) begin
        int acc;
        acc = 0;
        for (int j = 0; j < 16; j++) acc += int'(ad[j]);
        exp_sum.push_back(acc); exp_tag.push_back(int'(in_tag)); exp_cyc.push_back(cyc);
        sent++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (exp_sum.size() != 0) begin failures++; $display("FAIL %0d sums missing", exp_sum.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
