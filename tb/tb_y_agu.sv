// tb_y_agu: 16x16 co-located scans and 48x48 window scans at corner, edge and
// inner macroblocks of a QCIF frame; every address must be the window pixel
// clamped to the frame, with the right row/column tags and read count.
module tb_y_agu;
  import horb_pkg::*;
  localparam int W = 176, H = 144, AW = $clog2(W * H);
  logic clk = 0, rst_n = 0, start = 0, rd, busy;
  always #5 clk = ~clk;
  logic [7:0] mb_col = 0, mb_row = 0;
  disp_t off = 0;
  logic [5:0] size = 0, row, col;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  y_agu #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction

  task automatic scan(int r, int c, int o, int sz);
    @(negedge clk);
    mb_row = 8'(r); mb_col = 8'(c); off = disp_t'(o); size = 6'(sz); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < sz; i++)
      for (int j = 0; j < sz; j++) begin
        int ea = clampi(r * 16 + o + i, 0, H - 1) * W + clampi(c * 16 + o + j, 0, W - 1);
        checks++;
        if (!rd || int'(addr) != ea || int'(row) != i || int'(col) != j) begin
          failures++; $display("FAIL mb %0d,%0d (%0d,%0d) addr %0d exp %0d", r, c, i, j, addr, ea);
        end
        @(negedge clk);
      end
    checks++;
    if (rd || busy) begin failures++; $display("FAIL read after scan"); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    scan(0, 0, 0, 16); scan(0, 0, -16, 48); scan(8, 10, -16, 48); scan(4, 5, -16, 48); scan(8, 10, 0, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
