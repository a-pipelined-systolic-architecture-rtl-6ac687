// tb_sadav_unit: random SAD updates; after each one, ready must return after
// the 32-cycle division and sadav must equal the truncated mean of all
// updates since the last clear. have_avg must be low after clear.
module tb_sadav_unit;
  import horb_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, update = 0, have_avg, ready;
  always #5 clk = ~clk;
  sad_t sad = 0, sadav;
  longint sum; int cnt;
  int checks = 0, failures = 0;

  sadav_unit dut (.*);

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rnd = 0; rnd < 3; rnd++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      sum = 0; cnt = 0;
      checks++;
      if (have_avg !== 1'b0 || ready !== 1'b1) begin failures++; $display("FAIL after clear"); end
      for (int i = 0; i < 60; i++) begin
        int lat;
        sad = sad_t'((rnd == 2) ? $urandom_range(60000, 65535) : $urandom_range(0, 3000));
        update = 1; @(negedge clk); update = 0;
        sum += longint'(sad); cnt++;
        lat = 0;
        while (!ready) begin @(negedge clk); lat++; end
        checks++;
        if (int'(sadav) != int'(sum / longint'(cnt)) || !have_avg || lat != 32) begin
          failures++; $display("FAIL sadav %0d exp %0d latency %0d", sadav, sum / longint'(cnt), lat);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
