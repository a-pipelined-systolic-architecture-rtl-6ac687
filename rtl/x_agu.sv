// x_agu: address generation unit for the current frame (X).
//
// On start it reads num_lines lines of the macroblock at (mb_row, mb_col),
// beginning with line first_line, 16 pixels per line in raster order, one
// address per cycle starting the cycle after start. Each address comes with
// its line (row) and pixel (col) inside the macroblock, so the consumer can
// place the pixel returned by the frame memory. Used for the whole macroblock
// by the no-motion test and for one line at a time by the MEU's X bus.
// Address = (16*mb_row + row) * FRAME_W + 16*mb_col + col. That the current
// frame has an AGU of its own is from the document; the scan is this
// design's.
module x_agu
  import horb_pkg::*;
#(
  parameter int FRAME_W = 176,
  parameter int FRAME_H = 144,
  parameter int AW      = $clog2(FRAME_W * FRAME_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [7:0]    mb_col,
  input  logic [7:0]    mb_row,
  input  logic [3:0]    first_line,
  input  logic [4:0]    num_lines,
  output logic          rd,
  output logic [AW-1:0] addr,
  output logic [3:0]    row,
  output logic [3:0]    col,
  output logic          busy
);

  logic [4:0] left;   // lines left including the current one

  assign rd   = busy;
  assign addr = AW'((32'(mb_row) * MB + 32'(row)) * FRAME_W + 32'(mb_col) * MB + 32'(col));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; row <= '0; col <= '0; left <= '0;
    end else if (start && !busy) begin
      busy <= (num_lines != 0);
      row  <= first_line;
      col  <= '0;
      left <= num_lines;
    end else if (busy) begin
      col <= col + 1'b1;
      if (col == 4'(MB - 1)) begin
        row  <= row + 1'b1;
        left <= left - 1'b1;
        if (left == 5'd1) busy <= 1'b0;
      end
    end
  end

endmodule
