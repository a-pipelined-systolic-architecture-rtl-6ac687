// tb_min_sad_unit: random candidate streams with clears; the stored best must
// be the first strictly smallest SAD since the last clear.
module tb_min_sad_unit;
  import horb_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;
  candidate_t in, best;
  int bs, bh, bk; bit bv;
  int checks = 0, failures = 0;

  min_sad_unit dut (.*);

  initial begin
    in = '0; bv = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 60) == 0);
      in.valid = 1'($urandom_range(0, 1));
      in.sad = sad_t'($urandom_range(0, 40));   // small range: many ties
      in.h = disp_t'($urandom_range(0, 63)); in.k = disp_t'($urandom_range(0, 63));
      @(posedge clk);
      if (clear) bv = 0;
      else if (in.valid && (!bv || int'(in.sad) < bs)) begin bv = 1; bs = int'(in.sad); bh = int'(in.h); bk = int'(in.k); end
      #1;
      checks++;
      if (best.valid !== bv || (bv && (int'(best.sad) != bs || int'(best.h) != bh || int'(best.k) != bk))) begin
        failures++; $display("FAIL it %0d", it);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
