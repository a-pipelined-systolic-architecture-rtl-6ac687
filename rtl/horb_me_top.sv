// horb_me_top: motion estimation processor for the Hardware Oriented Region
// Based (HORB) algorithm, with full search as an alternative mode.
//
// For one 16x16 macroblock of the current frame, given by its indices
// (mb_row, mb_col), it finds the displacement (h, k) in [-16, 15] that
// minimises the sum of absolute differences with the previous frame, or
// declares the block stationary. Units:
//   horb_ctrl    macroblock controller: no-motion test, window load, region
//                order and stop test, average update
//   x_agu        addresses of the current frame (no-motion test, X bus)
//   y_agu        addresses of the previous frame (no-motion test, cache load)
//   nmdu         no-motion detection on the 5 MSBs
//   search_cache 48x48 search window
//   cache_agu    sequencer moving window rows into the MEU's delay lines
//   meu          delay lines, PEs, adder tree, SAD bank, partial SAD test,
//                minimum
//   sadav_unit   running average of the minimum SADs
//
// Frame memories are outside: cur_* and prev_* are read ports with one cycle
// of latency (address with cur_rd / prev_rd in cycle t, pixel in t+1). Pulse
// start while busy is low; done pulses with res valid. sadav_clear restarts
// the average, e.g. at the start of a sequence.
//
// Timing: 2 + 256 cycles for the no-motion test, 2304 to load the window,
// then 934 cycles per region searched (at most 25) and up to 34 for the
// average. The arrangement of units follows the document's processor; the
// memory interface and timing are this design's.
module horb_me_top
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
  input  logic          fs_mode,
  input  logic          sadav_clear,
  output logic          cur_rd,
  output logic [AW-1:0] cur_addr,
  input  pix_t          cur_data,
  output logic          prev_rd,
  output logic [AW-1:0] prev_addr,
  input  pix_t          prev_data,
  output logic          busy,
  output logic          done,
  output horb_result_t  res,
  output sad_t          sadav
);

  // controller
  logic            c_x_start, c_y_start, y_to_cache, y_busy;
  disp_t           y_off;
  logic [5:0]      y_size;
  logic            nmdu_clear, nmdu_done, nmdu_stat;
  logic            meu_clear, region_init, region_start, region_done, crit_en;
  disp_t           hc, kc;
  logic [RPTS-1:0] mask;
  candidate_t      best;
  logic [15:0]     active_lines;
  logic            have_avg, sadav_ready, sadav_update;
  logic [7:0]      cur_mb_col, cur_mb_row;
  // X path
  logic            x_start, x_busy;
  logic [3:0]      x_first, x_row, x_col, x_col_q;
  logic [4:0]      x_num;
  logic            cur_valid;
  // Y path
  logic [5:0]      y_row, y_col, y_row_q, y_col_q;
  logic            prev_valid, y_to_cache_q;
  // cache
  logic            ca_start_x, ca_busy;
  logic [3:0]      ca_x_line;
  caddr_t          raddr [3];
  pix_t            rdata [3];
  meu_ctrl_t       mctrl;
  logic [8:0]      nmdu_count;

  horb_ctrl #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_ctrl (
    .clk, .rst_n, .start, .mb_col, .mb_row, .fs_mode, .busy, .cur_mb_col, .cur_mb_row,
    .x_start(c_x_start), .y_start(c_y_start), .y_off, .y_size, .y_to_cache, .y_busy,
    .nmdu_clear, .nmdu_done, .nmdu_stationary(nmdu_stat),
    .meu_clear, .region_init, .region_start, .hc, .kc, .mask, .crit_en, .region_done,
    .best, .active_lines, .sadav, .have_avg, .sadav_ready, .sadav_update, .done, .res
  );

  // X AGU: whole macroblock for the no-motion test, single lines for the MEU
  assign x_start = c_x_start || ca_start_x;
  assign x_first = ca_busy ? ca_x_line : 4'd0;
  assign x_num   = ca_busy ? 5'd1 : 5'(MB);

  x_agu #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .AW(AW)) u_xagu (
    .clk, .rst_n, .start(x_start), .mb_col(cur_mb_col), .mb_row(cur_mb_row),
    .first_line(x_first), .num_lines(x_num),
    .rd(cur_rd), .addr(cur_addr), .row(x_row), .col(x_col), .busy(x_busy)
  );

  y_agu #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .AW(AW)) u_yagu (
    .clk, .rst_n, .start(c_y_start), .mb_col(cur_mb_col), .mb_row(cur_mb_row),
    .off(y_off), .size(y_size),
    .rd(prev_rd), .addr(prev_addr), .row(y_row), .col(y_col), .busy(y_busy)
  );

  // tags follow the frame memories' one-cycle latency
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_valid <= 1'b0; prev_valid <= 1'b0; x_col_q <= '0;
      y_row_q <= '0; y_col_q <= '0; y_to_cache_q <= 1'b0;
    end else begin
      cur_valid    <= cur_rd;
      prev_valid   <= prev_rd;
      x_col_q      <= x_col;
      y_row_q      <= y_row;
      y_col_q      <= y_col;
      y_to_cache_q <= y_to_cache;
    end
  end

  nmdu u_nmdu (
    .clk, .rst_n, .clear(nmdu_clear),
    .valid(prev_valid && !y_to_cache_q), .x(cur_data), .y(prev_data),
    .done(nmdu_done), .stationary(nmdu_stat), .count(nmdu_count)
  );

  search_cache u_cache (
    .clk,
    .we    (prev_valid && y_to_cache_q),
    .waddr (caddr_t'(int'(y_row_q) * SW + int'(y_col_q))),
    .wdata (prev_data),
    .raddr (raddr),
    .rdata (rdata)
  );

  cache_agu u_cagu (
    .clk, .rst_n, .start(region_start), .hc, .kc,
    .busy(ca_busy), .done(region_done), .raddr, .ctrl(mctrl),
    .x_start(ca_start_x), .x_line(ca_x_line)
  );

  meu u_meu (
    .clk, .rst_n, .clear(meu_clear), .init(region_init), .mask, .hc, .kc,
    .crit_en, .sadav, .ctrl(mctrl),
    .fill_px0(rdata[0]), .fill_px1(rdata[1]), .run_px(rdata[2]),
    .x_valid(cur_valid && ca_busy), .x_col(x_col_q), .x_px(cur_data),
    .best, .active_lines
  );

  sadav_unit u_sadav (
    .clk, .rst_n, .clear(sadav_clear), .update(sadav_update), .sad(best.sad),
    .sadav, .have_avg, .ready(sadav_ready)
  );

`ifndef SYNTHESIS
  // the X AGU serves the no-motion test and the MEU, never both at once
  a_xagu: assert property (@(posedge clk) disable iff (!rst_n) x_start |-> !x_busy)
    else $error("horb_me_top: X AGU request while busy");
  // no macroblock start while one is in progress
  a_start: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("horb_me_top: start while busy");
`endif

endmodule
