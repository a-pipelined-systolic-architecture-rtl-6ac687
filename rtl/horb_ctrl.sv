// horb_ctrl: macroblock controller of the HORB motion estimation processor.
//
// For each macroblock (start with mb_row, mb_col):
//  1. No-motion test: the X and Y AGUs read the macroblock and the co-located
//     16x16 block of the previous frame into the NMDU. A stationary block
//     ends here with vector (0,0).
//  2. Search-window load: the Y AGU copies the 48x48 window into the cache.
//  3. Region search: the centre region (group 1) is searched; after every
//     region the best SAD so far is tested against
//     T = SADav * (10 - g) / 5 (g = group of that region) as
//     best * 5 < SADav * (10 - g), and the search stops when it passes.
//     Otherwise the 8 regions of group 2 are visited clockwise starting with
//     the one whose centre is nearest to the best vector, then likewise the 16
//     regions of group 3. Each region's vectors outside the [-16, 15] range
//     or the frame are masked.
//  4. The best SAD enters the running average SADav; the result is presented
//     with a one-cycle done pulse.
// In fs_mode all 25 regions are searched with no stop test and no partial SAD
// criterion (full search). For the first macroblock after the average is
// cleared there is no SADav, and the search is full as well.
//
// The no-motion test, the 25 regions in three groups, the stop threshold and
// the average are from the document. The ring order, the start rule for
// group 3, the strict comparison and the behaviour with no SADav are this
// design's choices.
module horb_ctrl
  import horb_pkg::*;
#(
  parameter int FRAME_W = 176,
  parameter int FRAME_H = 144
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [7:0]      mb_col,
  input  logic [7:0]      mb_row,
  input  logic            fs_mode,
  output logic            busy,
  output logic [7:0]      cur_mb_col,    // macroblock being processed
  output logic [7:0]      cur_mb_row,
  // X AGU and Y AGU requests
  output logic            x_start,       // whole macroblock, no-motion test
  output logic            y_start,
  output disp_t           y_off,
  output logic [5:0]      y_size,
  output logic            y_to_cache,    // Y data goes to the cache (else NMDU)
  input  logic            y_busy,
  // NMDU
  output logic            nmdu_clear,
  input  logic            nmdu_done,
  input  logic            nmdu_stationary,
  // MEU and cache AGU
  output logic            meu_clear,
  output logic            region_init,
  output logic            region_start,
  output disp_t           hc,
  output disp_t           kc,
  output logic [RPTS-1:0] mask,
  output logic            crit_en,
  input  logic            region_done,
  input  candidate_t      best,
  input  logic [15:0]     active_lines,
  // SADav
  input  sad_t            sadav,
  input  logic            have_avg,
  input  logic            sadav_ready,
  output logic            sadav_update,
  // result
  output logic            done,
  output horb_result_t    res
);

  typedef enum logic [3:0] {
    S_IDLE, S_NMD, S_NMD_WAIT, S_LOAD, S_LOAD_WAIT, S_REG_INIT, S_REG_WAIT,
    S_TEST, S_AVG, S_AVG_WAIT
  } state_t;

  state_t     st;
  logic [7:0] mbc, mbr;
  logic       fs_q;
  logic [1:0] grp;
  logic [3:0] e0, cnt;
  logic [4:0] nreg;
  logic       stop;
  disp_t      bh, bk;

  // vectors of the region at (hc, kc) that may be evaluated
  always_comb begin
    int h, k, y0, x0;
    y0 = int'(mbr) * MB;
    x0 = int'(mbc) * MB;
    for (int hh = 0; hh < RSIDE; hh++)
      for (int kk = 0; kk < RSIDE; kk++) begin
        h = int'(hc) - RHALF + hh;
        k = int'(kc) - RHALF + kk;
        mask[hh*RSIDE+kk] = (h >= -RANGE) && (h <= RANGE - 1) && (k >= -RANGE) && (k <= RANGE - 1)
                         && (y0 + h >= 0) && (y0 + h + MB - 1 <= FRAME_H - 1)
                         && (x0 + k >= 0) && (x0 + k + MB - 1 <= FRAME_W - 1);
      end
  end

  assign crit_en = !fs_q && have_avg;
  assign stop    = crit_en && best.valid &&
                   ((20'(best.sad) * 20'd5) < (20'(sadav) * 20'(4'd10 - 4'(grp))));
  assign bh      = best.valid ? best.h : '0;
  assign bk      = best.valid ? best.k : '0;
  assign busy    = (st != S_IDLE);
  assign cur_mb_col = mbc;
  assign cur_mb_row = mbr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; mbc <= '0; mbr <= '0; fs_q <= 1'b0; grp <= 2'd1; e0 <= '0; cnt <= '0;
      nreg <= '0; hc <= '0; kc <= '0;
      x_start <= 1'b0; y_start <= 1'b0; y_off <= '0; y_size <= '0; y_to_cache <= 1'b0;
      nmdu_clear <= 1'b0; meu_clear <= 1'b0; region_init <= 1'b0; region_start <= 1'b0;
      sadav_update <= 1'b0; done <= 1'b0; res <= '0;
    end else begin
      x_start <= 1'b0; y_start <= 1'b0; nmdu_clear <= 1'b0; meu_clear <= 1'b0;
      region_init <= 1'b0; region_start <= 1'b0; sadav_update <= 1'b0; done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          mbc <= mb_col; mbr <= mb_row; fs_q <= fs_mode;
          nmdu_clear <= 1'b1;
          meu_clear  <= 1'b1;
          st <= S_NMD;
        end
        S_NMD: begin
          x_start <= 1'b1;
          y_start <= 1'b1; y_off <= '0; y_size <= 6'(MB); y_to_cache <= 1'b0;
          st <= S_NMD_WAIT;
        end
        S_NMD_WAIT: if (nmdu_done) begin
          if (nmdu_stationary) begin
            res  <= '{mv_h: '0, mv_k: '0, sad: '0, sad_valid: 1'b0, stationary: 1'b1,
                      regions: '0, active_lines: '0};
            done <= 1'b1;
            st   <= S_IDLE;
          end else st <= S_LOAD;
        end
        S_LOAD: begin
          y_start <= 1'b1; y_off <= disp_t'(-RANGE); y_size <= 6'(SW); y_to_cache <= 1'b1;
          grp <= 2'd1; cnt <= '0; nreg <= '0; hc <= '0; kc <= '0;
          st <= S_LOAD_WAIT;
        end
        S_LOAD_WAIT: if (!y_start && !y_busy) st <= S_REG_INIT;
        S_REG_INIT: begin
          // one cycle after the last cache write has landed
          region_init  <= 1'b1;
          region_start <= 1'b1;
          st <= S_REG_WAIT;
        end
        S_REG_WAIT: if (region_done) begin
          nreg <= nreg + 1'b1;
          st   <= S_TEST;
        end
        S_TEST: begin
          if (stop) st <= S_AVG;
          else if (grp == 2'd1) begin
            grp <= 2'd2; cnt <= '0;
            e0  <= ring_nearest(2, bh, bk);
            hc  <= disp_t'(RSIDE) * ring_a(2, int'(ring_nearest(2, bh, bk)));
            kc  <= disp_t'(RSIDE) * ring_b(2, int'(ring_nearest(2, bh, bk)));
            st  <= S_REG_INIT;
          end else if (grp == 2'd2 && cnt != 4'd7) begin
            cnt <= cnt + 1'b1;
            hc  <= disp_t'(RSIDE) * ring_a(2, int'(3'(e0 + cnt + 1'b1)));
            kc  <= disp_t'(RSIDE) * ring_b(2, int'(3'(e0 + cnt + 1'b1)));
            st  <= S_REG_INIT;
          end else if (grp == 2'd2) begin
            grp <= 2'd3; cnt <= '0;
            e0  <= ring_nearest(3, bh, bk);
            hc  <= disp_t'(RSIDE) * ring_a(3, int'(ring_nearest(3, bh, bk)));
            kc  <= disp_t'(RSIDE) * ring_b(3, int'(ring_nearest(3, bh, bk)));
            st  <= S_REG_INIT;
          end else if (cnt != 4'd15) begin
            cnt <= cnt + 1'b1;
            hc  <= disp_t'(RSIDE) * ring_a(3, int'(4'(e0 + cnt + 1'b1)));
            kc  <= disp_t'(RSIDE) * ring_b(3, int'(4'(e0 + cnt + 1'b1)));
            st  <= S_REG_INIT;
          end else st <= S_AVG;
        end
        S_AVG: begin
          if (best.valid) sadav_update <= 1'b1;
          res <= '{mv_h: bh, mv_k: bk, sad: best.sad, sad_valid: best.valid, stationary: 1'b0,
                   regions: nreg, active_lines: active_lines};
          st  <= S_AVG_WAIT;
        end
        S_AVG_WAIT: if (!sadav_update && sadav_ready) begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
