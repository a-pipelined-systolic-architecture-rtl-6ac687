// tb_horb_ctrl: the macroblock controller with its datapath replaced by a
// scripted environment. The environment answers the no-motion test, the
// window load and every region; each region returns a chosen best candidate,
// and the environment keeps the running minimum as the MEU would. Checked:
// the sequence of region centres against the reference ordering (centre,
// ring of 8 from the nearest region, ring of 16 from the nearest region),
// where the search stops under the threshold SADav*(10-g)/5, the region mask
// at a frame corner, the criterion enable, the average update and the
// result. Scenarios: stationary block, no average yet, stop after the centre
// region, stop in ring 2, stop in ring 3, full-search mode, no valid vector.
module tb_horb_ctrl;
  import horb_pkg::*;
  import horb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, fs_mode = 0, busy, x_start, y_start, y_to_cache, y_busy = 0;
  logic [7:0] mb_col = 0, mb_row = 0, cur_mb_col, cur_mb_row;
  disp_t y_off, hc, kc;
  logic [5:0] y_size;
  logic nmdu_clear, nmdu_done = 0, nmdu_stationary = 0, meu_clear, region_init, region_start;
  logic [48:0] mask;
  logic crit_en, region_done = 0;
  candidate_t best;
  logic [15:0] active_lines = 16'd1234;
  sad_t sadav = 0;
  logic have_avg = 0, sadav_ready = 1, sadav_update, done;
  horb_result_t res;

  int checks = 0, failures = 0;
  // scenario: region whose candidate is good, and its SAD
  int good_a, good_b, good_sad, other_sad, stat_s;
  bit none;
  int nreg, nupd;
  int seq_h [$], seq_k [$];

  horb_ctrl #(.FRAME_W(176), .FRAME_H(144)) dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // environment
  initial forever begin
    @(posedge clk);
    if (meu_clear) best <= '0;
    if (nmdu_clear) begin
      repeat (20) @(posedge clk);
      nmdu_done <= 1; nmdu_stationary <= 1'(stat_s);
      @(posedge clk); nmdu_done <= 0;
    end
    if (y_start) begin
      y_busy <= 1; repeat (30) @(posedge clk); y_busy <= 0;
    end
    if (region_start) begin
      candidate_t c;
      int s;
      seq_h.push_back(int'(hc)); seq_k.push_back(int'(kc));
      s = (int'(hc) == 7 * good_a && int'(kc) == 7 * good_b) ? good_sad : other_sad;
      // each region's best lies one step off its centre, towards the upper left
      c.valid = !none; c.sad = sad_t'(s); c.h = hc - 1; c.k = kc - 2;
      repeat (6) @(posedge clk);
      if (c.valid && (!best.valid || c.sad < best.sad)) best <= c;
      @(posedge clk); region_done <= 1; @(posedge clk); region_done <= 0;
    end
    if (sadav_update) begin
      nupd++;
      sadav_ready <= 0; repeat (5) @(posedge clk); sadav_ready <= 1;
    end
  end

  task automatic scenario(string name, int r, int c, bit fs, bit ha, int av, int st, int ga, int gb,
                          int gs, int os, bit nn, int exp_regions);
    int eh [$], ek [$];
    int bh = 0, bk = 0, bs = -1, g = 1, e0 = 0;
    stat_s = st; good_a = ga; good_b = gb; good_sad = gs; other_sad = os; none = nn;
    have_avg = ha; sadav = sad_t'(av);
    seq_h = {}; seq_k = {}; nupd = 0;
    // expected region sequence
    if (st == 0)
      for (int i = 0; i < 25; i++) begin
        int a, b, s;
        if (i == 0) begin a = 0; b = 0; g = 1; end
        else if (i < 9) begin if (i == 1) begin g = 2; e0 = nearest(2, bh, bk); end
          a = horb_ref_pkg::ring_a(2, (e0 + i - 1) % 8); b = horb_ref_pkg::ring_b(2, (e0 + i - 1) % 8); end
        else begin if (i == 9) begin g = 3; e0 = nearest(3, bh, bk); end
          a = horb_ref_pkg::ring_a(3, (e0 + i - 9) % 16); b = horb_ref_pkg::ring_b(3, (e0 + i - 9) % 16); end
        eh.push_back(7 * a); ek.push_back(7 * b);
        s = (a == ga && b == gb) ? gs : os;
        if (!nn && (bs < 0 || s < bs)) begin bs = s; bh = 7 * a - 1; bk = 7 * b - 2; end
        if (!fs && ha && bs >= 0 && bs * 5 < av * (10 - g)) break;
      end
    @(negedge clk);
    mb_row = 8'(r); mb_col = 8'(c); fs_mode = fs; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    chk(res.stationary == 1'(st), {name, ": stationary"});
    chk(seq_h.size() == eh.size() && eh.size() == (st != 0 ? 0 : exp_regions),
        $sformatf("%s: %0d regions, model %0d, expected %0d", name, seq_h.size(), eh.size(), exp_regions));
    for (int i = 0; i < eh.size() && i < seq_h.size(); i++)
      chk(seq_h[i] == eh[i] && seq_k[i] == ek[i],
          $sformatf("%s: region %0d at (%0d,%0d) exp (%0d,%0d)", name, i, seq_h[i], seq_k[i], eh[i], ek[i]));
    if (st == 0) begin
      chk(int'(res.regions) == eh.size(), {name, ": regions field"});
      chk(res.sad_valid == !nn && (nn || (int'(res.mv_h) == bh && int'(res.mv_k) == bk && int'(res.sad) == bs)),
          $sformatf("%s: result (%0d,%0d) %0d exp (%0d,%0d) %0d", name, res.mv_h, res.mv_k, res.sad, bh, bk, bs));
      chk(res.active_lines == 16'd1234, {name, ": active lines"});
      chk(nupd == (nn ? 0 : 1), {name, ": average update"});
      chk(crit_en == (!fs && ha), {name, ": criterion enable"});
    end
    $display("%s: %0d regions", name, seq_h.size());
  endtask

  initial begin
    best = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    scenario("stationary",   3, 4, 0, 1, 1000, 1, 0, 0, 500, 9000, 0, 0);
    scenario("no average",   3, 4, 0, 0, 0,    0, 0, 0, 500, 9000, 0, 25);
    scenario("stop g1",      3, 4, 0, 1, 1000, 0, 0, 0, 1700, 9000, 0, 1);
    scenario("no stop g1",   3, 4, 0, 1, 1000, 0, 0, 0, 1800, 1800, 0, 25);
    scenario("stop g2",      3, 4, 0, 1, 1000, 0, 1, 1, 1500, 9000, 0, 7);
    scenario("stop g3",      3, 4, 0, 1, 1000, 0, 2, -1, 1300, 9000, 0, 23);
    scenario("full search",  3, 4, 1, 1, 1000, 0, 0, 0, 100, 9000, 0, 25);
    scenario("no vector",    3, 4, 0, 1, 1000, 0, 0, 0, 100, 9000, 1, 25);
    // mask at the top-left macroblock, centre region: h < 0 or k < 0 masked
    @(negedge clk);
    begin
      logic [48:0] em;
      for (int hh = 0; hh < 7; hh++) for (int kk = 0; kk < 7; kk++) em[hh * 7 + kk] = (hh >= 3 && kk >= 3);
      mb_row = 0; mb_col = 0; stat_s = 0; have_avg = 1; start = 1;
      @(negedge clk); start = 0;
      while (!region_init) @(negedge clk);
      chk(mask == em, $sformatf("corner mask %h exp %h", mask, em));
      while (!done) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
