// diamond_checker_tb: exhaustive test of the code checker Q.
//
// All 32 input words are applied; ok must be 1 exactly for the ten words
// 3d + 2, d = 0..9, listed here independently of the checker.
module diamond_checker_tb;
  import diamond_pkg::*;

  diamond_t f;
  logic     ok;
  int checks = 0, failures = 0;

  diamond_checker dut (.f(f), .ok(ok));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    bit valid [32];
    for (int w = 0; w < 32; w++) valid[w] = 0;
    for (int dd = 0; dd < 10; dd++) valid[3 * dd + 2] = 1;
    for (int w = 0; w < 32; w++) begin
      f = 5'(w);
      #1;
      checks++;
      if (ok !== valid[w]) begin
        failures++;
        $display("FAIL word %0d: ok=%b expected %b", w, ok, valid[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
