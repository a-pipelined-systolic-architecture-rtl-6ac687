// y_agu: address generation unit for the previous frame (Y).
//
// On start it reads a size x size square whose top-left corner is off pixels
// (signed, both directions) from the top-left corner of the macroblock at
// (mb_row, mb_col), in raster order, one address per cycle starting the cycle
// after start. Coordinates outside the frame are clamped to its edge; the
// vectors that would use such pixels are never evaluated, so clamping only
// keeps the reads inside the frame. With off = 0, size = 16 it reads the
// co-located macroblock for the no-motion test; with off = -16, size = 48 it
// reads the search window into the cache. row and col give the position in
// the square. That the previous frame has an AGU of its own is from the
// document; the scan and the clamping are this design's.
module y_agu
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
  input  disp_t         off,
  input  logic [5:0]    size,
  output logic          rd,
  output logic [AW-1:0] addr,
  output logic [5:0]    row,
  output logic [5:0]    col,
  output logic          busy
);

  logic [5:0] size_q;
  disp_t      off_q;
  int         fy, fx;

  always_comb begin
    fy = int'(mb_row) * MB + int'(off_q) + int'(row);
    fx = int'(mb_col) * MB + int'(off_q) + int'(col);
    if (fy < 0) fy = 0; else if (fy > FRAME_H - 1) fy = FRAME_H - 1;
    if (fx < 0) fx = 0; else if (fx > FRAME_W - 1) fx = FRAME_W - 1;
  end

  assign rd   = busy;
  assign addr = AW'(fy * FRAME_W + fx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; row <= '0; col <= '0; size_q <= '0; off_q <= '0;
    end else if (start && !busy) begin
      busy   <= (size != 0);
      row    <= '0;
      col    <= '0;
      size_q <= size;
      off_q  <= off;
    end else if (busy) begin
      if (col == size_q - 1'b1) begin
        col <= '0;
        row <= row + 1'b1;
        if (row == size_q - 1'b1) busy <= 1'b0;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
