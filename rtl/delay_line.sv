// delay_line: 16-tap shift register of previous-frame (Y) pixels feeding the
// 16 processing elements.
//
// Pixels of one search-window row enter at the top tap and move towards tap 0
// (the oldest pixel). Tap j feeds PE j. While the line is being filled two
// pixels enter per cycle (fill: d0 then d1, d1 being the newer), so a 16-tap
// line is full after 8 cycles, as the document states. While SAD_lines are
// computed one pixel enters per cycle (shift), which moves the window one
// column right: the next cycle's SAD_line belongs to displacement k+1.
// fill and shift are never asserted together. Contents are undefined until
// the first fill, which is why there is no reset.
module delay_line
  import horb_pkg::*;
#(
  parameter int N = MB
) (
  input  logic clk,
  input  logic fill,       // shift in d0, d1
  input  pix_t d0,
  input  pix_t d1,
  input  logic shift,      // shift in d
  input  pix_t d,
  output pix_t taps [N]
);

  pix_t q [N];

  always_ff @(posedge clk) begin
    if (fill) begin
      for (int j = 0; j < N - 2; j++) q[j] <= q[j+2];
      q[N-2] <= d0;
      q[N-1] <= d1;
    end else if (shift) begin
      for (int j = 0; j < N - 1; j++) q[j] <= q[j+1];
      q[N-1] <= d;
    end
  end

  assign taps = q;

`ifndef SYNTHESIS
  a_excl: assert property (@(posedge clk) !(fill && shift))
    else $error("delay_line: fill and shift together");
`endif

endmodule
