// tb_sad_bank: feeds the SAD_lines of a whole region (16 lines x 49 vectors,
// random values, random gaps) in the processor's order and checks every
// vector's enable flag after each line and the complete SADs forwarded for
// line 15, against a model of accumulation and the partial SAD criterion.
// Runs with the criterion off and on, and with a mask.
module tb_sad_bank;
  import horb_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, crit_en = 0, in_valid = 0;
  always #5 clk = ~clk;
  logic [48:0] mask, en;
  disp_t hc = 0, kc = 0;
  sad_t sadav = 0;
  tag_t in_tag;
  sadline_t in_sad;
  candidate_t final_out;
  int acc [49]; bit men [49];
  int checks = 0, failures = 0, finals = 0, kills = 0;

  sad_bank dut (.*);

  task automatic region(bit crit, int av, logic [48:0] m, int chc, int ckc);
    @(negedge clk);
    init = 1; mask = m; crit_en = crit; sadav = sad_t'(av); hc = disp_t'(chc); kc = disp_t'(ckc);
    for (int v = 0; v < 49; v++) men[v] = m[v];
    @(negedge clk); init = 0;
    for (int line = 0; line < 16; line++)
      for (int hh = 0; hh < 7; hh++)
        for (int kk = 0; kk < 7; kk++) begin
          int v = hh * 7 + kk;
          int sl = $urandom_range(0, 1200);
          if (!men[v]) continue;   // the MEU computes nothing for a disabled vector
          in_valid = 1; in_tag = '{hh: 3'(hh), kk: 3'(kk), line: 4'(line)}; in_sad = sadline_t'(sl);
          acc[v] = (line == 0 ? 0 : acc[v]) + sl;
          @(negedge clk);
          in_valid = 0;
          if (crit && acc[v] * 8 > av * (line + 6)) begin men[v] = 0; kills++; end
          checks++;
          if (en[v] !== men[v]) begin failures++; $display("FAIL en[%0d] line %0d", v, line); end
          checks++;
          if (line == 15 && men[v]) begin
            finals++;
            if (!final_out.valid || int'(final_out.sad) != acc[v] || int'(final_out.h) != chc - 3 + hh ||
                int'(final_out.k) != ckc - 3 + kk) begin
              failures++; $display("FAIL final v %0d sad %0d exp %0d", v, final_out.sad, acc[v]);
            end
          end else if (final_out.valid) begin failures++; $display("FAIL spurious final"); end
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    region(0, 0, {49{1'b1}}, 0, 0);
    region(1, 3000, {49{1'b1}}, 7, -14);
    region(1, 5000, 49'h1_F0F0_F0F0_FFFF, -7, 7);
    checks++;
    if (kills == 0 || finals == 0) begin failures++; $display("FAIL kills %0d finals %0d", kills, finals); end
    $display("kills=%0d finals=%0d", kills, finals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
