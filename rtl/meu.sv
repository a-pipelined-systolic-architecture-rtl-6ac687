// meu: motion estimation unit, the systolic datapath that computes one
// SAD_line per cycle.
//
// Structure: two 16-tap delay lines of previous-frame (Y) pixels, 16
// processing elements holding the current macroblock line (X_act) and the
// next one (X_next), a pipelined adder tree, and the bank of partial-SAD
// registers with the partial SAD unit, followed by the minimum unit.
//
// One delay line is filled with the next search-window row (two pixels per
// cycle, 8 cycles) while the other, already full, is used for 7 consecutive
// SAD_lines: after each one it shifts in one pixel, which moves to the next
// horizontal displacement k. The cache AGU drives all of this through ctrl,
// which arrives together with the three cache pixels it asked for. A
// SAD_line whose vector is disabled in the bank is not computed: the PEs and
// the tree hold their registers.
//
// Timing: a SAD_line started in cycle t reaches the bank at t+5 (PE 1, tree 4)
// and the minimum unit at t+6. active_lines counts the SAD_lines actually
// computed since clear; it is the activity figure used to compare the power
// of HORB with full search.
//
// The datapath follows the document's figures of the unit, PE and adder
// tree; the control word and the counter are this design's.
module meu
  import horb_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // macroblock / region control
  input  logic            clear,        // start of a macroblock
  input  logic            init,         // start of a region
  input  logic [RPTS-1:0] mask,         // vectors allowed in this region
  input  disp_t           hc,
  input  disp_t           kc,
  input  logic            crit_en,
  input  sad_t            sadav,
  // from the cache AGU and the cache
  input  meu_ctrl_t       ctrl,
  input  pix_t            fill_px0,
  input  pix_t            fill_px1,
  input  pix_t            run_px,
  // X bus
  input  logic            x_valid,
  input  logic [3:0]      x_col,
  input  pix_t            x_px,
  // results
  output candidate_t      best,
  output logic [15:0]     active_lines
);

  pix_t       taps [2][MB];
  pix_t       y    [MB];
  pix_t       ad   [MB];
  logic [RPTS-1:0] en;
  logic       compute;
  logic       tree_in_valid;
  tag_t       tree_in_tag;
  logic       tree_valid;
  tag_t       tree_tag;
  sadline_t   tree_sum;
  candidate_t cand;

  for (genvar l = 0; l < 2; l++) begin : g_dl
    delay_line #(.N(MB)) u_dl (
      .clk   (clk),
      .fill  (ctrl.fill_en && ctrl.fill_sel == 1'(l)),
      .d0    (fill_px0),
      .d1    (fill_px1),
      .shift (ctrl.run_en && ctrl.run_shift && ctrl.run_sel == 1'(l)),
      .d     (run_px),
      .taps  (taps[l])
    );
  end

  assign y       = taps[ctrl.run_sel];
  assign compute = ctrl.run_en && en[int'(ctrl.tag.hh) * RSIDE + int'(ctrl.tag.kk)];

  for (genvar j = 0; j < MB; j++) begin : g_pe
    pe u_pe (
      .clk    (clk),
      .x_load (x_valid && x_col == 4'(j)),
      .x_in   (x_px),
      .x_swap (ctrl.xswap),
      .en     (compute),
      .y      (y[j]),
      .ad     (ad[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tree_in_valid <= 1'b0;
      active_lines  <= '0;
    end else begin
      tree_in_valid <= compute;
      if (clear)        active_lines <= '0;
      else if (compute) active_lines <= active_lines + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (compute) tree_in_tag <= ctrl.tag;
  end

  adder_tree #(.N(MB), .TAG_W($bits(tag_t))) u_tree (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (tree_in_valid),
    .in_tag    (tree_in_tag),
    .ad        (ad),
    .out_valid (tree_valid),
    .out_tag   (tree_tag),
    .sum       (tree_sum)
  );

  sad_bank u_bank (
    .clk       (clk),
    .rst_n     (rst_n),
    .init      (init),
    .mask      (mask),
    .hc        (hc),
    .kc        (kc),
    .crit_en   (crit_en),
    .sadav     (sadav),
    .in_valid  (tree_valid),
    .in_tag    (tree_tag),
    .in_sad    (tree_sum),
    .en        (en),
    .final_out (cand)
  );

  min_sad_unit u_min (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (clear),
    .in    (cand),
    .best  (best)
  );

endmodule
