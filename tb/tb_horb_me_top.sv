// tb_horb_me_top: end-to-end test of the HORB motion estimation processor.
//
// A previous frame of random texture and a current frame made of its
// macroblocks moved by known vectors plus +-2 of noise are held in two
// memories with one cycle of read latency. Every macroblock is run through
// the processor and the result (vector, SAD, stationary flag, regions
// searched, SAD_lines computed) and the running average are compared with
// the reference model. The run goes through HORB mode, then full-search mode
// and back. The mechanisms of the design are counted and each must occur:
// stationary block, search without an average yet, stop after the centre
// region, stop in the second ring, search reaching the outer ring, partial
// SAD kills, vectors masked at the frame edge, and the full-search mode.
// Cycle counts per macroblock are checked against the schedule
// (258 + 2304 + 934 per region, plus up to 36 for the average update).
module tb_horb_me_top;
  import horb_pkg::*;
  import horb_ref_pkg::*;

  localparam int W  = 64;
  localparam int H  = 48;
  localparam int AW = $clog2(W * H);
  localparam int NMB = (W / 16) * (H / 16);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start = 0, fs_mode = 0, sadav_clear = 0;
  logic [7:0]    mb_col = 0, mb_row = 0;
  logic          cur_rd, prev_rd, busy, done;
  logic [AW-1:0] cur_addr, prev_addr;
  pix_t          cur_data, prev_data;
  horb_result_t  res;
  sad_t          sadav;

  byte unsigned cur[], prev[];
  int mvh[] = '{0, 1, 5, -14, 3, 0, 9, -6, 2, 12, -2, -9};
  int mvk[] = '{0, -2, 2, 12, 3, 0, -10, 8, -1, 4, 14, -3};

  horb_me_top #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

  always_ff @(posedge clk) begin
    cur_data  <= cur[cur_addr];
    prev_data <= prev[prev_addr];
  end

  int checks = 0, failures = 0;
  int n_stat = 0, n_noavg = 0, n_stop1 = 0, n_stop2 = 0, n_g3 = 0, n_kill = 0, n_mask = 0, n_fs = 0;
  longint sum = 0; int cnt = 0;
  longint pass1_cycles = 0; int pass1_regions = 0, pass1_mbs = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_mb(int r, int c, bit fs, bit count_it = 0);
    ref_res_t e;
    int cyc, av;
    av = (cnt == 0) ? 0 : int'(sum / longint'(cnt));
    e = model(cur, prev, W, H, r, c, fs, cnt != 0, av);
    @(posedge clk);
    mb_row <= 8'(r); mb_col <= 8'(c); fs_mode <= fs; start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
    chk(res.stationary == e.stationary, $sformatf("MB %0d,%0d stationary %0d exp %0d", r, c, res.stationary, e.stationary));
    chk(res.sad_valid == e.sad_valid, $sformatf("MB %0d,%0d sad_valid", r, c));
    chk(int'(res.mv_h) == e.mv_h && int'(res.mv_k) == e.mv_k,
        $sformatf("MB %0d,%0d mv (%0d,%0d) exp (%0d,%0d)", r, c, res.mv_h, res.mv_k, e.mv_h, e.mv_k));
    chk(int'(res.sad) == e.sad, $sformatf("MB %0d,%0d sad %0d exp %0d", r, c, res.sad, e.sad));
    chk(int'(res.regions) == e.regions, $sformatf("MB %0d,%0d regions %0d exp %0d", r, c, res.regions, e.regions));
    chk(int'(res.active_lines) == e.active_lines,
        $sformatf("MB %0d,%0d active lines %0d exp %0d", r, c, res.active_lines, e.active_lines));
    if (e.stationary) chk(cyc < 270, $sformatf("stationary cycles %0d", cyc));
    else chk(cyc >= 2565 + 934 * e.regions && cyc <= 2610 + 934 * e.regions,
             $sformatf("MB %0d,%0d cycles %0d for %0d regions", r, c, cyc, e.regions));
    if (e.sad_valid) begin sum += longint'(e.sad); cnt++; end
    if (count_it) begin pass1_cycles += longint'(cyc); pass1_regions += e.regions; pass1_mbs++; end
    repeat (2) @(posedge clk);
    chk(cnt == 0 || int'(sadav) == int'(sum / longint'(cnt)), $sformatf("sadav %0d exp %0d", sadav, cnt != 0 ? sum / longint'(cnt) : 0));
    // mechanism counters
    if (e.stationary) n_stat++;
    if (!e.stationary && av == 0 && !fs) n_noavg++;
    if (fs && !e.stationary) n_fs++;
    if (!fs && av != 0 && !e.stationary && e.regions == 1) n_stop1++;
    if (!fs && av != 0 && e.regions > 1 && e.regions < 9) n_stop2++;
    if (e.groups_reached == 3) n_g3++;
    if (e.kills > 0) n_kill++;
    if (e.masked) n_mask++;
    $display("MB %0d,%0d fs=%0d mv=(%0d,%0d) sad=%0d stat=%0d regions=%0d lines=%0d cycles=%0d",
             r, c, fs, $signed(res.mv_h), $signed(res.mv_k), res.sad, res.stationary, res.regions, res.active_lines, cyc);
  endtask

  initial begin
    cur = new[W * H]; prev = new[W * H];
    make_frames(cur, prev, W, H, 1, mvh, mvk, 2);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); sadav_clear <= 1; @(posedge clk); sadav_clear <= 0;
    for (int m = 0; m < NMB; m++) run_mb(m / (W / 16), m % (W / 16), 0, 1);
    for (int m = 0; m < 3; m++) run_mb(m / (W / 16), m % (W / 16), 1);
    for (int m = 0; m < 3; m++) run_mb(m / (W / 16), m % (W / 16), 0);
    chk(n_stat > 0,  "no stationary block");
    chk(n_noavg > 0, "no search without average");
    chk(n_stop1 > 0, "no stop after the centre region");
    chk(n_stop2 > 0, "no stop in the second ring");
    chk(n_g3 > 0,    "outer ring never reached");
    chk(n_kill > 0,  "no partial SAD kill");
    chk(n_mask > 0,  "no masked vector");
    chk(n_fs > 0,    "full-search mode never run");
    $display("mechanisms: stationary=%0d no_avg=%0d stop_g1=%0d stop_g2=%0d reach_g3=%0d kill_mbs=%0d masked_mbs=%0d fs=%0d",
             n_stat, n_noavg, n_stop1, n_stop2, n_g3, n_kill, n_mask, n_fs);
    $display("HORB pass: %0d macroblocks, %0d cycles, %0.2f regions and %0.0f cycles per macroblock; 15 frames/s of this frame need %0.1f MHz",
             pass1_mbs, pass1_cycles, real'(pass1_regions) / pass1_mbs, real'(pass1_cycles) / pass1_mbs,
             real'(pass1_cycles) * 15.0 / 1.0e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
