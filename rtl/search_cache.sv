// search_cache: internal memory holding the search window of the previous
// frame for the macroblock being processed.
//
// SW x SW pixels (48 x 48 for a [-16, 15] search range around a 16 x 16
// macroblock), written one pixel per cycle while the window is loaded from
// the frame memory and read through three ports: two for the delay line
// being filled (two adjacent pixels per cycle) and one for the delay line
// being shifted. Reads are synchronous: data appear the cycle after the
// address. Address = row * SW + column. Keeping the window on chip, so the
// frame memory is read once per macroblock, follows the document; its size
// and port arrangement are this design's.
module search_cache
  import horb_pkg::*;
#(
  parameter int NPORT = 3
) (
  input  logic   clk,
  input  logic   we,
  input  caddr_t waddr,
  input  pix_t   wdata,
  input  caddr_t raddr [NPORT],
  output pix_t   rdata [NPORT]
);

  pix_t mem [SW * SW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    for (int i = 0; i < NPORT; i++) rdata[i] <= mem[raddr[i]];
  end

endmodule
