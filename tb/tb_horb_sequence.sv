// tb_horb_sequence: runs a short QCIF sequence (176x144, default parameters)
// through the processor, frame after frame, keeping SADav across frames as an
// encoder would. The sequence has a background panning by (1,2) pixels per
// frame and an object moving by (-3,4), both with smooth texture, and +-1
// of noise. Every macroblock result is checked against the reference model.
// The test then reports what HORB costs and loses against full search.
// Cost is the SAD_lines computed, the datapath activity that sets its power.
// Loss is the share of macroblocks where HORB's SAD equals the full-search
// optimum, and the total SAD ratio. It also reports the clock needed for
// 15 frames/s.
module tb_horb_sequence;
  import horb_pkg::*;
  import horb_ref_pkg::*;

  localparam int W  = 176;
  localparam int H  = 144;
  localparam int AW = $clog2(W * H);
  localparam int NMB = (W / 16) * (H / 16);
  localparam int NF = 4;

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

  horb_me_top dut (.*);

  always_ff @(posedge clk) begin
    cur_data  <= cur[cur_addr];
    prev_data <= prev[prev_addr];
  end

  int checks = 0, failures = 0;
  longint sum = 0; int cnt = 0;
  longint cycles = 0, lines_horb = 0, lines_fs = 0, sad_horb = 0, sad_fs = 0;
  int same = 0, searched = 0, stat = 0, mbs = 0, novec = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_mb(int r, int c);
    ref_res_t e, f;
    int cyc, av;
    av = (cnt == 0) ? 0 : int'(sum / longint'(cnt));
    e = model(cur, prev, W, H, r, c, 0, cnt != 0, av);
    f = model(cur, prev, W, H, r, c, 1, 0, 0);
    @(posedge clk);
    mb_row <= 8'(r); mb_col <= 8'(c); start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
    chk(res.stationary == e.stationary && res.sad_valid == e.sad_valid &&
        int'(res.mv_h) == e.mv_h && int'(res.mv_k) == e.mv_k && int'(res.sad) == e.sad &&
        int'(res.regions) == e.regions && int'(res.active_lines) == e.active_lines,
        $sformatf("MB %0d,%0d: (%0d,%0d) %0d r%0d l%0d, model (%0d,%0d) %0d r%0d l%0d", r, c,
                  $signed(res.mv_h), $signed(res.mv_k), res.sad, res.regions, res.active_lines,
                  e.mv_h, e.mv_k, e.sad, e.regions, e.active_lines));
    if (e.sad_valid) begin sum += longint'(e.sad); cnt++; end
    cycles += longint'(cyc);
    mbs++;
    lines_fs += longint'(f.active_lines);
    lines_horb += longint'(e.active_lines);
    if (e.stationary) stat++;
    else if (e.sad_valid) begin
      searched++;
      sad_horb += longint'(e.sad);
      sad_fs += longint'(f.sad);
      if (e.sad == f.sad) same++;
    end else novec++;
  endtask

  initial begin
    cur = new[W * H]; prev = new[W * H];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); sadav_clear <= 1; @(posedge clk); sadav_clear <= 0;
    make_scene(cur, W, H, 0, 1, 2, -3, 4);
    for (int fr = 1; fr < NF; fr++) begin
      prev = cur;
      cur = new[W * H];
      make_scene(cur, W, H, fr, 1, 2, -3, 4);
      for (int m = 0; m < NMB; m++) run_mb(m / (W / 16), m % (W / 16));
      $display("frame %0d done, SADav %0d", fr, sadav);
    end
    chk(lines_horb < lines_fs, "HORB computed no fewer SAD_lines than full search");
    chk(same > 0, "HORB never found the full-search optimum");
    $display("%0d macroblocks: %0d stationary, %0d with every vector rejected by the partial SAD test", mbs, stat, novec);
    $display("%0d searched with a result; HORB found the full-search SAD in %0d (%0.1f%%)",
             searched, same, 100.0 * same / (searched > 0 ? searched : 1));
    $display("total SAD HORB / full search: %0.3f", real'(sad_horb) / real'(sad_fs > 0 ? sad_fs : 1));
    $display("SAD_lines computed: HORB %0d, full search %0d: %0.1f%% of full search",
             lines_horb, lines_fs, 100.0 * real'(lines_horb) / real'(lines_fs));
    $display("%0.0f cycles per macroblock; 15 frames/s need %0.1f MHz",
             real'(cycles) / mbs, real'(cycles) / (NF - 1) * 15.0 / 1.0e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
