// tb_cache_agu: runs the region sequencer against a model of the cache (one
// cycle read latency) and of the two delay lines it drives. For every SAD_line
// issued, the 16 pixels then in the selected delay line must be the window
// row i + h + 16 starting at column k + 16 (clamped), and the SAD_lines must
// come in order line, hh, kk. Also checked: 784 SAD_lines per region at 7 per
// 8 cycles, one X line request per line in order, each line's X swap after its
// request and before its first SAD_line, and the region time (931 cycles
// from start to done).
module tb_cache_agu;
  import horb_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, x_start;
  always #5 clk = ~clk;
  disp_t hc = 0, kc = 0;
  caddr_t raddr [3];
  meu_ctrl_t ctrl;
  logic [3:0] x_line;
  pix_t win [SW * SW];
  pix_t rd [3];
  pix_t dl [2][16];
  int checks = 0, failures = 0;
  int i, hh, kk, row;
  bit ok;
  int nrun, nx, nswap, expect_seq, cyc, runs_first, runs_last;

  cache_agu dut (.*);

  always_ff @(posedge clk)
    for (int p = 0; p < 3; p++) rd[p] <= win[raddr[p]];

  function automatic int cl(int v);
    return v < 0 ? 0 : v > SW - 1 ? SW - 1 : v;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (x_start) begin
      checks++;
      if (int'(x_line) != nx) begin failures++; $display("FAIL x line %0d exp %0d", x_line, nx); end
      nx++;
    end
    if (ctrl.xswap) begin
      checks++;
      if (nswap >= nx) begin failures++; $display("FAIL swap before X request"); end
      nswap++;
    end
    if (ctrl.run_en) begin
      i = int'(ctrl.tag.line); hh = int'(ctrl.tag.hh); kk = int'(ctrl.tag.kk);
      row = cl(i + int'(hc) - 3 + hh + 16);
      ok = 1;
      for (int j = 0; j < 16; j++)
        if (dl[ctrl.run_sel][j] !== win[row * SW + cl(int'(kc) - 3 + kk + j + 16)]) ok = 0;
      checks++;
      if (!ok) begin failures++; $display("FAIL data line %0d hh %0d kk %0d", i, hh, kk); end
      checks++;
      if (i * 49 + hh * 7 + kk != expect_seq || nswap != i + 1) begin
        failures++; $display("FAIL order line %0d hh %0d kk %0d (seq %0d, swaps %0d)", i, hh, kk, expect_seq, nswap);
      end
      if (nrun == 0) runs_first = cyc;
      runs_last = cyc;
      expect_seq++; nrun++;
    end
    // delay line model
    if (ctrl.fill_en) begin
      for (int j = 0; j < 14; j++) dl[ctrl.fill_sel][j] = dl[ctrl.fill_sel][j+2];
      dl[ctrl.fill_sel][14] = rd[0]; dl[ctrl.fill_sel][15] = rd[1];
    end
    if (ctrl.run_en && ctrl.run_shift) begin
      for (int j = 0; j < 15; j++) dl[ctrl.run_sel][j] = dl[ctrl.run_sel][j+1];
      dl[ctrl.run_sel][15] = rd[2];
    end
  end

  task automatic region(int h, int k);
    int t0;
    nrun = 0; nx = 0; nswap = 0; expect_seq = 0;
    @(negedge clk); hc = disp_t'(h); kc = disp_t'(k); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (nrun != 784 || nx != 16 || nswap != 16 || cyc - t0 != 931 || runs_last - runs_first + 1 != 112 * 8 - 1) begin
      failures++;
      $display("FAIL region (%0d,%0d): runs %0d x %0d swaps %0d cycles %0d span %0d", h, k, nrun, nx, nswap, cyc - t0,
               runs_last - runs_first + 1);
    end
  endtask

  initial begin
    cyc = 0;
    for (int i = 0; i < SW * SW; i++) win[i] = pix_t'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    region(0, 0); region(7, -7); region(-14, 14); region(14, -14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
