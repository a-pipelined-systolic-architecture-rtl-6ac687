// tb_partial_sad_unit: random and boundary values against the criterion
// psad > SADav * (n + 5) / 8 computed with real arithmetic.
module tb_partial_sad_unit;
  import horb_pkg::*;
  logic enable; sad_t psad, sadav; logic [4:0] n; logic kill;
  int checks = 0, failures = 0;

  partial_sad_unit dut (.*);

  task automatic one(bit e, int p, int nn, int av);
    bit expk;
    enable = e; psad = sad_t'(p); n = 5'(nn); sadav = sad_t'(av);
    #1;
    expk = e && (real'(p) > real'(av) * real'(nn + 5) / 8.0);
    checks++;
    if (kill !== expk) begin failures++; $display("FAIL e=%0d psad=%0d n=%0d av=%0d kill=%0d", e, p, nn, av, kill); end
  endtask

  initial begin
    // boundary: av = 800, n = 3 -> T2 = 800 exactly
    one(1, 800, 3, 800); one(1, 801, 3, 800); one(1, 799, 3, 800); one(0, 60000, 1, 1);
    one(1, 65535, 16, 65535); one(1, 0, 1, 0); one(1, 1, 1, 0);
    for (int i = 0; i < 2000; i++)
      one($urandom_range(0, 7) != 0, $urandom_range(0, 65535) >> $urandom_range(0, 12),
          $urandom_range(1, 16), $urandom_range(0, 65535) >> $urandom_range(0, 12));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
