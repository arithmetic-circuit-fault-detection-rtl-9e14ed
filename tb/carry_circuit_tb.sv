// carry_circuit_tb: exhaustive test of the carry circuit CC.
//
// With both copies of L equal, b must be 3L + 2 (mod 32) and flt must be set
// exactly when 3L + 2 exceeds 31 (L from 10 to 15). With the two copies
// different, as under a fault on one of them, {flt, b} must equal
// l + 2*l_fb + 2, which shows that each copy enters with its own weight.
module carry_circuit_tb;
  import diamond_pkg::*;

  logic [3:0] l, l_fb;
  diamond_t   b;
  logic       flt;
  int checks = 0, failures = 0;

  carry_circuit dut (.l(l), .l_fb(l_fb), .b(b), .flt(flt));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int x = 0; x < 16; x++) begin
      int e;
      l = 4'(x); l_fb = 4'(x);
      #1;
      e = 3 * x + 2;
      checks++;
      if (b != 5'(e) || flt != (e > 31)) begin
        failures++;
        $display("FAIL L=%0d: b=%0d flt=%b, expected b=%0d flt=%b", x, b, flt, e % 32, e > 31);
      end
    end
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        int e;
        l = 4'(x); l_fb = 4'(y);
        #1;
        e = x + 2 * y + 2;
        checks++;
        if ({flt, b} != 6'(e)) begin
          failures++;
          $display("FAIL l=%0d l_fb=%0d: {flt,b}=%0d expected %0d", x, y, {flt, b}, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
