// pe: processing element of the motion estimation unit.
//
// Each PE holds one pixel of the current macroblock line in X_act and the
// same pixel of the next line in X_next. X_next is written from the X bus
// while the current line is still being processed; x_swap copies X_next into
// X_act in one cycle, so the next line can start without a pipeline bubble.
// When en is high the PE registers |X_act - y|, one cycle of latency. When en
// is low the difference register keeps its value, so a disabled vector causes
// no switching in the PE or the adder tree behind it. The two X registers and
// the absolute difference follow the document's PE; the operand isolation is
// this design's way of disabling computations.
module pe
  import horb_pkg::*;
(
  input  logic clk,
  input  logic x_load,   // X_next <= x_in
  input  pix_t x_in,
  input  logic x_swap,   // X_act <= X_next
  input  logic en,       // compute
  input  pix_t y,
  output pix_t ad        // |X_act - y|, registered
);

  pix_t x_next, x_act;

  always_ff @(posedge clk) begin
    if (x_load) x_next <= x_in;
    if (x_swap) x_act  <= x_next;
    if (en)     ad     <= (x_act > y) ? pix_t'(x_act - y) : pix_t'(y - x_act);
  end

endmodule
