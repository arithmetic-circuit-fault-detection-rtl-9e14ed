// rca_section_tb: exhaustive test of one ripple-carry adder section AD^i.
//
// For every digit A, every carry digit C (0..9, both in Diamond Code) and
// both ripple inputs, x must be the code word of (A + C + cin) mod 10 and
// cout must be 1 exactly when A + C + cin reaches 10.
module rca_section_tb;
  import diamond_pkg::*;

  diamond_t a, b, x;
  logic     cin, cout;
  int checks = 0, failures = 0;

  rca_section dut (.a(a), .b(b), .cin(cin), .x(x), .cout(cout));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int da = 0; da < 10; da++)
      for (int dc = 0; dc < 10; dc++)
        for (int ci = 0; ci < 2; ci++) begin
          int s;
          a = 5'(3 * da + 2); b = 5'(3 * dc + 2); cin = 1'(ci);
          #1;
          s = da + dc + ci;
          checks++;
          if (x != 5'(3 * (s % 10) + 2) || cout != (s >= 10)) begin
            failures++;
            $display("FAIL A=%0d C=%0d cin=%0d: x=%0d cout=%b, expected digit %0d carry %b",
                     da, dc, ci, x, cout, s % 10, s >= 10);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
