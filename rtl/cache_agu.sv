// cache_agu: address generator and sequencer that moves the search window
// from the internal cache into the MEU for one region of 7x7 vectors.
//
// Work is counted in slots of 8 cycles. For every macroblock line i
// (0..15) and every vertical displacement index hh (0..6), i.e. for
// s = 7*i + hh, one slot fills a delay line with the 16 pixels of cache row
// i + h + 16 starting at column k0 + 16 (two pixels per cycle), where
// h = hc - 3 + hh and k0 = kc - 3. In the following slot that delay line
// produces 7 SAD_lines, one per cycle for kk = 0..6, shifting in pixels
// 16..21 of the row in between; the 8th cycle is idle. Meanwhile the other
// delay line is filled for s + 1, so the two lines alternate and the unit
// computes 7 SAD_lines every 8 cycles. All SAD_lines of line i are done before
// line i + 1 is started, so every X line is fetched once per region.
//
// Schedule with slot number t (0..114): fill of s in slot s + 2, run of s in
// slot s + 3; X line i fetched through the X AGU from slot 7i (16 cycles);
// X_next -> X_act in the idle cycle of slot 7i + 2, just before the first run
// of line i. After the last slot a drain of DRAIN cycles lets the pipeline
// empty, then done pulses. Total 115 * 8 + DRAIN cycles per region.
//
// Interface: cache addresses are combinational from the counters; ctrl is
// registered, so it reaches the MEU together with the cache's registered read
// data. x_start/x_line request one X line from the X AGU. Cache rows and
// columns outside the window are clamped; the vectors using them are masked.
// The fill/run alternation, the 8-cycle fill and the 7-cycle run follow the
// document; the slot schedule, the idle cycle and the X timing are this
// design's.
module cache_agu
  import horb_pkg::*;
#(
  parameter int DRAIN = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  disp_t     hc,
  input  disp_t     kc,
  output logic      busy,
  output logic      done,
  output caddr_t    raddr [3],   // 0,1: fill pixels; 2: run pixel
  output meu_ctrl_t ctrl,
  output logic      x_start,
  output logic [3:0] x_line
);

  localparam int NSLOT = RSIDE * MB + 3;   // 115

  logic [2:0] p;        // phase in slot
  logic [2:0] tr;       // t mod 7
  logic [4:0] tq;       // t div 7
  logic       run_slots;
  logic [4:0] drain;
  disp_t      hc_q, kc_q;
  meu_ctrl_t  c;

  function automatic caddr_t cad(input int row, input int col);
    int r, cl;
    r  = (row < 0) ? 0 : (row > SW - 1) ? SW - 1 : row;
    cl = (col < 0) ? 0 : (col > SW - 1) ? SW - 1 : col;
    return caddr_t'(r * SW + cl);
  endfunction

  int  t, sf, sr, fi, fhh, ri, rhh, k0;

  always_comb begin
    t   = 7 * int'(tq) + int'(tr);
    sf  = t - 2;
    sr  = t - 3;
    fi  = (sf < 0) ? 0 : sf / 7;  fhh = (sf < 0) ? 0 : sf % 7;
    ri  = (sr < 0) ? 0 : sr / 7;  rhh = (sr < 0) ? 0 : sr % 7;
    k0  = int'(kc_q) - RHALF + RANGE;
    c   = '0;
    raddr[0] = '0; raddr[1] = '0; raddr[2] = '0;
    if (run_slots) begin
      if (sf >= 0 && sf < RSIDE * MB) begin
        c.fill_en  = 1'b1;
        c.fill_sel = sf[0];
        raddr[0] = cad(fi + int'(hc_q) - RHALF + fhh + RANGE, k0 + 2 * int'(p));
        raddr[1] = cad(fi + int'(hc_q) - RHALF + fhh + RANGE, k0 + 2 * int'(p) + 1);
      end
      if (sr >= 0 && sr < RSIDE * MB && p < 3'(RSIDE)) begin
        c.run_en    = 1'b1;
        c.run_sel   = sr[0];
        c.run_shift = (p < 3'(RSIDE - 1));
        c.tag.hh    = 3'(rhh);
        c.tag.kk    = p;
        c.tag.line  = 4'(ri);
        raddr[2] = cad(ri + int'(hc_q) - RHALF + rhh + RANGE, k0 + MB + int'(p));
      end
      c.xswap = (tr == 3'd2) && (p == 3'd7) && (tq < 5'(MB));
    end
  end

  assign x_start = run_slots && tr == 3'd0 && p == 3'd0 && tq < 5'(MB);
  assign x_line  = tq[3:0];
  assign busy    = run_slots || drain != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '0; tr <= '0; tq <= '0; run_slots <= 1'b0; drain <= '0;
      done <= 1'b0; ctrl <= '0; hc_q <= '0; kc_q <= '0;
    end else begin
      done <= 1'b0;
      ctrl <= c;
      if (start && !busy) begin
        run_slots <= 1'b1;
        p <= '0; tr <= '0; tq <= '0;
        hc_q <= hc; kc_q <= kc;
      end else if (run_slots) begin
        p <= p + 1'b1;
        if (p == 3'd7) begin
          if (7 * int'(tq) + int'(tr) == NSLOT - 1) begin
            run_slots <= 1'b0;
            drain     <= 5'(DRAIN);
          end else if (tr == 3'd6) begin
            tr <= '0;
            tq <= tq + 1'b1;
          end else begin
            tr <= tr + 1'b1;
          end
        end
      end else if (drain != 0) begin
        drain <= drain - 1'b1;
        if (drain == 5'd1) done <= 1'b1;
      end
    end
  end

`ifndef SYNTHESIS
  // the delay line being filled is never the one producing SAD_lines
  a_lines: assert property (@(posedge clk) disable iff (!rst_n)
                            (ctrl.fill_en && ctrl.run_en) |-> (ctrl.fill_sel != ctrl.run_sel))
    else $error("cache_agu: fill and run on the same delay line");
  // a new region is only started when the previous one has finished
  a_start: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("cache_agu: start while busy");
`endif

endmodule
