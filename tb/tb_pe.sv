// tb_pe: checks the processing element: X_next loading, the swap into X_act,
// the registered absolute difference and that the output holds while en is
// low.
module tb_pe;
  import horb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic x_load = 0, x_swap = 0, en = 0;
  pix_t x_in = 0, y = 0, ad;
  int xn, xa, mad;
  int checks = 0, failures = 0;

  pe dut (.*);

  initial begin
    @(negedge clk); x_load = 1; x_in = 8'd10; @(negedge clk); x_load = 0; x_swap = 1;
    @(negedge clk); x_swap = 0; en = 1; y = 8'd3; @(negedge clk); en = 0;
    xn = 10; xa = 10; mad = 7;
    for (int it = 0; it < 500; it++) begin
      x_load = 1'($urandom_range(0, 1)); x_swap = $urandom_range(0, 3) == 0; en = 1'($urandom_range(0, 1));
      x_in = pix_t'($urandom); y = pix_t'($urandom);
      @(posedge clk);
      if (en) mad = (xa > int'(y)) ? xa - int'(y) : int'(y) - xa;
      if (x_swap) xa = xn;
      if (x_load) xn = int'(x_in);
      #1;
      checks++;
      if (int'(ad) != mad) begin failures++; $display("FAIL it %0d ad %0d exp %0d", it, ad, mad); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
