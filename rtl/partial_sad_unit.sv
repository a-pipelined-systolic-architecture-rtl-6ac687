// partial_sad_unit: the partial SAD criterion.
//
// After n lines of the macroblock have been accumulated for a vector, the
// vector is dropped (kill) when its partial SAD exceeds
//     T2 = SADav * (n + 5) / 8.
// The test is done as psad * 8 > SADav * (n + 5), which is exact and needs
// no divider: a shift and a small constant multiplier. The formula follows
// the document; the strict comparison and the enable input (criterion off
// for full search and while no SADav exists yet) are this design's choices.
// Purely combinational.
module partial_sad_unit
  import horb_pkg::*;
(
  input  logic       enable,
  input  sad_t       psad,   // partial SAD after n lines
  input  logic [4:0] n,      // lines accumulated, 1..16
  input  sad_t       sadav,
  output logic       kill
);

  logic [SAD_W+5:0] lhs, rhs;

  always_comb begin
    lhs  = (SAD_W + 6)'(psad) << 3;
    rhs  = (SAD_W + 6)'(sadav) * (SAD_W + 6)'(n + 5'd5);
    kill = enable && (lhs > rhs);
  end

endmodule
