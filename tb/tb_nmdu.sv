// tb_nmdu: blocks of 256 pixel pairs with a chosen number of pairs whose 5
// MSBs match (including 179 and 180, either side of the 70% threshold, and
// differences only in the 3 LSBs); checks the count, the decision and that
// done comes one cycle after the last pair.
module tb_nmdu;
  import horb_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  always #5 clk = ~clk;
  pix_t x = 0, y = 0;
  logic done, stationary;
  logic [8:0] count;
  int checks = 0, failures = 0;

  nmdu dut (.*);

  task automatic block(int nmatch);
    int idx [256];
    bit m [256];
    for (int i = 0; i < 256; i++) begin idx[i] = i; m[i] = 0; end
    idx.shuffle();
    for (int i = 0; i < nmatch; i++) m[idx[i]] = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < 256; i++) begin
      pix_t a = pix_t'($urandom);
      valid = 1; x = a;
      if (m[i]) y = {a[7:3], 3'($urandom)};
      else      y = {a[7:3] ^ 5'($urandom_range(1, 31)), 3'($urandom)};
      @(negedge clk);
      if (i == 255) break;
      checks++;
      if (done !== 1'b0) begin failures++; $display("FAIL early done"); end
      if ($urandom_range(0, 3) == 0) begin valid = 0; @(negedge clk); end
    end
    valid = 0;
    checks++;
    if (done !== 1'b1 || int'(count) != nmatch || stationary !== (nmatch >= 180)) begin
      failures++; $display("FAIL nmatch %0d: done %0d count %0d stationary %0d", nmatch, done, count, stationary);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    block(179); block(180); block(0); block(256); block(100); block(200); block(181);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
