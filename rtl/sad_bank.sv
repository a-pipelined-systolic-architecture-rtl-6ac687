// sad_bank: the bank of registers holding the partial SADs of the 49 vectors
// of the region being searched, with the partial SAD unit.
//
// init loads the enable flags from mask (vectors outside the search range or
// the frame start disabled) at the start of a region. Each valid SAD_line from
// the adder tree, tagged with (hh, kk, line), is added to its accumulator
// (line 0 starts it afresh) and the new partial SAD is checked by the partial
// SAD unit; a vector that fails is disabled and receives no further
// computation in this region. When line 15 of an enabled vector is added the
// complete SAD is sent to the minimum unit as a candidate, with the vector
// (h, k) = (hc - 3 + hh, kc - 3 + kk). One cycle of latency. Accumulating
// line by line and testing after each line follow the document; the exact
// encoding of the bank is this design's.
module sad_bank
  import horb_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic [RPTS-1:0] mask,
  input  disp_t           hc,
  input  disp_t           kc,
  input  logic            crit_en,  // partial SAD criterion on
  input  sad_t            sadav,
  input  logic            in_valid,
  input  tag_t            in_tag,
  input  sadline_t        in_sad,
  output logic [RPTS-1:0] en,       // enabled vectors, index hh*7+kk
  output candidate_t      final_out // complete SAD of an enabled vector
);

  sad_t acc [RPTS];
  sad_t acc_new;
  int   idx;
  logic kill;

  assign idx     = int'(in_tag.hh) * RSIDE + int'(in_tag.kk);
  assign acc_new = ((in_tag.line == 4'd0) ? sad_t'(0) : acc[idx]) + sad_t'(in_sad);

  partial_sad_unit u_psu (
    .enable (crit_en),
    .psad   (acc_new),
    .n      (5'(in_tag.line) + 5'd1),
    .sadav  (sadav),
    .kill   (kill)
  );

  always_ff @(posedge clk) begin
    if (in_valid) acc[idx] <= acc_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en        <= '0;
      final_out <= '0;
    end else begin
      final_out.valid <= 1'b0;
      if (init) begin
        en <= mask;
      end else if (in_valid && en[idx]) begin
        if (kill) en[idx] <= 1'b0;
        if (in_tag.line == 4'(MB - 1) && !kill) begin
          final_out.valid <= 1'b1;
          final_out.h     <= hc - disp_t'(RHALF) + disp_t'(in_tag.hh);
          final_out.k     <= kc - disp_t'(RHALF) + disp_t'(in_tag.kk);
          final_out.sad   <= acc_new;
        end
      end
    end
  end

endmodule
