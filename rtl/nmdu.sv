// nmdu: no-motion detection unit.
//
// Before any search, each pixel of the current macroblock is compared with
// the pixel at the same place in the previous frame (displacement (0,0)),
// using only the MSB most significant bits so that noise in the low bits is
// ignored. Matching pixels are counted; after NPIX pixel pairs, done pulses
// and stationary says whether more than PCT percent of them matched, in which
// case the search is skipped. The test is done as count*100 > PCT*NPIX
// (180 of 256 pixels for the defaults). Pixel pairs arrive one per cycle with
// valid; clear restarts the count. The 5 MSBs and the 70% threshold follow
// the document.
module nmdu
  import horb_pkg::*;
#(
  parameter int MSB  = NMD_MSB,
  parameter int PCT  = NMD_PCT,
  parameter int NPIX = MB * MB
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     valid,
  input  pix_t                     x,
  input  pix_t                     y,
  output logic                     done,
  output logic                     stationary,
  output logic [$clog2(NPIX+1)-1:0] count
);

  localparam int CW = $clog2(NPIX + 1);
  logic [CW-1:0] seen;
  logic          match;
  logic [CW-1:0] count_n;

  assign match   = (x[PIX_W-1 -: MSB] == y[PIX_W-1 -: MSB]);
  assign count_n = count + CW'(match);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen <= '0; count <= '0; done <= 1'b0; stationary <= 1'b0;
    end else if (clear) begin
      seen <= '0; count <= '0; done <= 1'b0; stationary <= 1'b0;
    end else begin
      done <= 1'b0;
      if (valid) begin
        count <= count_n;
        seen  <= seen + 1'b1;
        if (seen == CW'(NPIX - 1)) begin
          done       <= 1'b1;
          stationary <= (32'(count_n) * 100) > (PCT * NPIX);
        end
      end
    end
  end

endmodule
