// tb_meu: the motion estimation unit driven by its region sequencer and a
// search window memory (both from the design), with the X bus modelled as
// the X AGU plus frame memory (pixels 2..17 cycles after each line request).
// The window is random and the macroblock is a noisy copy of the window at a
// known displacement. Several regions are searched with and without the
// partial SAD criterion and with masked vectors; after each region the best
// vector and SAD and the number of SAD_lines computed are compared with a
// direct computation.
module tb_meu;
  import horb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, init = 0, crit_en = 0, start = 0, busy, done, x_start, x_valid = 0;
  logic [48:0] mask = '1;
  disp_t hc = 0, kc = 0;
  sad_t sadav = 0;
  caddr_t raddr [3];
  pix_t rdata [3];
  meu_ctrl_t ctrl;
  logic [3:0] x_line, x_col = 0;
  pix_t x_px = 0;
  candidate_t best;
  logic [15:0] active_lines;
  logic we = 0; caddr_t waddr = 0; pix_t wdata = 0;

  pix_t win [SW * SW];
  pix_t xmb [16][16];
  int checks = 0, failures = 0;
  int eb, ebh, ebk, elines, nkill;

  search_cache u_cache (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  cache_agu u_agu (.clk, .rst_n, .start, .hc, .kc, .busy, .done, .raddr, .ctrl, .x_start, .x_line);
  meu dut (.clk, .rst_n, .clear, .init, .mask, .hc, .kc, .crit_en, .sadav, .ctrl,
           .fill_px0(rdata[0]), .fill_px1(rdata[1]), .run_px(rdata[2]),
           .x_valid, .x_col, .x_px, .best, .active_lines);

  // X bus: 16 pixels of the requested line, starting two cycles after the request
  initial forever begin
    @(posedge clk);
    if (x_start) begin
      int ln;
      ln = int'(x_line);
      @(posedge clk);
      for (int j = 0; j < 16; j++) begin
        x_valid <= 1; x_col <= 4'(j); x_px <= xmb[ln][j];
        @(posedge clk);
      end
      x_valid <= 0;
    end
  end

  function automatic int sadl(int h, int k, int i);
    int s = 0;
    for (int j = 0; j < 16; j++) begin
      int d = int'(xmb[i][j]) - int'(win[(i + h + 16) * SW + (j + k + 16)]);
      s += d < 0 ? -d : d;
    end
    return s;
  endfunction

  task automatic region(int chc, int ckc, bit crit, int av, logic [48:0] m);
    for (int hh = 0; hh < 7; hh++)
      for (int kk = 0; kk < 7; kk++) begin
        int h = chc - 3 + hh, k = ckc - 3 + kk, ps = 0;
        bit killed = 0;
        if (!m[hh * 7 + kk]) continue;
        for (int n = 1; n <= 16 && !killed; n++) begin
          ps += sadl(h, k, n - 1);
          elines++;
          if (crit && ps * 8 > av * (n + 5)) begin killed = 1; nkill++; end
        end
        if (!killed && (eb < 0 || ps < eb)) begin eb = ps; ebh = h; ebk = k; end
      end
    @(negedge clk);
    hc = disp_t'(chc); kc = disp_t'(ckc); crit_en = crit; sadav = sad_t'(av); mask = m;
    init = 1; start = 1;
    @(negedge clk); init = 0; start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (best.valid !== (eb >= 0) || (eb >= 0 && (int'(best.sad) != eb || int'(best.h) != ebh || int'(best.k) != ebk))) begin
      failures++; $display("FAIL region (%0d,%0d): best %0d (%0d,%0d) exp %0d (%0d,%0d)", chc, ckc,
                           best.sad, best.h, best.k, eb, ebh, ebk);
    end
    checks++;
    if (int'(active_lines) != elines) begin failures++; $display("FAIL lines %0d exp %0d", active_lines, elines); end
  endtask

  initial begin
    automatic int dh = 5, dk = -9;
    for (int i = 0; i < SW * SW; i++) win[i] = pix_t'($urandom);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        automatic int v = int'(win[(i + dh + 16) * SW + j + dk + 16]) + $urandom_range(0, 4) - 2;
        xmb[i][j] = pix_t'(v < 0 ? 0 : v > 255 ? 255 : v);
      end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < SW * SW; i++) begin
      @(negedge clk); we = 1; waddr = caddr_t'(i); wdata = win[i];
    end
    @(negedge clk); we = 0;
    // macroblock 1: no criterion
    clear = 1; @(negedge clk); clear = 0; eb = -1; elines = 0; nkill = 0;
    region(0, 0, 0, 0, '1);
    region(7, -7, 0, 0, '1);
    // macroblock 2: partial SAD criterion, masked vectors
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; eb = -1; elines = 0;
    region(0, 0, 1, 2000, '1);
    region(7, -7, 1, 2000, 49'h0_FFFF_FFFF_0F0F);
    region(-7, 7, 1, 2000, '1);
    checks++;
    if (nkill == 0) begin failures++; $display("FAIL no kill"); end
    $display("kills=%0d", nkill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
