// min_sad_unit: keeps the smallest complete SAD of a macroblock and its
// motion vector.
//
// clear empties it at the start of a macroblock. Each cycle with in.valid a
// candidate is compared with the stored best and replaces it only when
// strictly smaller, so among equal SADs the first vector evaluated wins (the
// tie rule is this design's choice). The best of all regions searched so far
// is what the controller tests against the region threshold.
module min_sad_unit
  import horb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  candidate_t in,
  output candidate_t best
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  best <= '0;
    else if (clear)                              best <= '0;
    else if (in.valid && (!best.valid || in.sad < best.sad)) best <= in;
  end

endmodule
