// tb_x_agu: whole-macroblock and single-line scans at several macroblock
// positions of a QCIF frame; every address, tag and the number of reads are
// checked, and the first address must come the cycle after start.
module tb_x_agu;
  import horb_pkg::*;
  localparam int W = 176, H = 144, AW = $clog2(W * H);
  logic clk = 0, rst_n = 0, start = 0, rd, busy;
  always #5 clk = ~clk;
  logic [7:0] mb_col = 0, mb_row = 0;
  logic [3:0] first_line = 0, row, col;
  logic [4:0] num_lines = 0;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  x_agu #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

  task automatic scan(int r, int c, int fl, int nl);
    @(negedge clk);
    mb_row = 8'(r); mb_col = 8'(c); first_line = 4'(fl); num_lines = 5'(nl); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < nl; i++)
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (!rd || int'(addr) != (r * 16 + fl + i) * W + c * 16 + j || int'(row) != fl + i || int'(col) != j) begin
          failures++; $display("FAIL mb %0d,%0d line %0d px %0d addr %0d", r, c, fl + i, j, addr);
        end
        @(negedge clk);
      end
    checks++;
    if (rd || busy) begin failures++; $display("FAIL read after scan"); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    scan(0, 0, 0, 16); scan(8, 10, 0, 16); scan(3, 5, 7, 1); scan(8, 10, 15, 1); scan(4, 2, 2, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
