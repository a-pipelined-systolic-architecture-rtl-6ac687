// tb_search_cache: fills the 48x48 window with random pixels, then reads
// random addresses on all three ports at once (and while writing) and checks
// the data one cycle later.
module tb_search_cache;
  import horb_pkg::*;
  logic clk = 0, we = 0;
  always #5 clk = ~clk;
  caddr_t waddr = 0, raddr [3];
  pix_t wdata = 0, rdata [3];
  pix_t m [SW * SW];
  int a [3];
  int checks = 0, failures = 0;

  search_cache dut (.*);

  initial begin
    for (int i = 0; i < 3; i++) raddr[i] = '0;
    for (int i = 0; i < SW * SW; i++) begin
      @(negedge clk); we = 1; waddr = caddr_t'(i); wdata = pix_t'($urandom); m[i] = wdata;
    end
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin a[p] = $urandom_range(0, SW * SW - 1); raddr[p] = caddr_t'(a[p]); end
      we = 1'($urandom_range(0, 1)); waddr = caddr_t'($urandom_range(0, SW * SW - 1)); wdata = pix_t'($urandom);
      @(posedge clk); #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rdata[p] !== m[a[p]]) begin failures++; $display("FAIL port %0d addr %0d", p, a[p]); end
      end
      if (we) m[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
