// tb_delay_line: checks the 16-tap delay line against a queue model: fills of
// two pixels per cycle, single shifts, idle cycles, random sequences.
module tb_delay_line;
  import horb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic fill = 0, shift = 0;
  pix_t d0, d1, d, taps [16];
  pix_t m [16];
  int checks = 0, failures = 0;

  delay_line dut (.*);

  initial begin
    for (int it = 0; it < 400; it++) begin
      automatic int op = (it < 8) ? 0 : $urandom_range(0, 2);
      @(negedge clk);
      fill = (op == 0); shift = (op == 1);
      d0 = pix_t'($urandom); d1 = pix_t'($urandom); d = pix_t'($urandom);
      @(posedge clk);
      if (op == 0) begin
        for (int j = 0; j < 14; j++) m[j] = m[j+2];
        m[14] = d0; m[15] = d1;
      end else if (op == 1) begin
        for (int j = 0; j < 15; j++) m[j] = m[j+1];
        m[15] = d;
      end
      #1;
      if (it >= 7) begin
        for (int j = 0; j < 16; j++) begin
          checks++;
          if (taps[j] !== m[j]) begin failures++; $display("FAIL it %0d tap %0d %0d exp %0d", it, j, taps[j], m[j]); end
        end
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
