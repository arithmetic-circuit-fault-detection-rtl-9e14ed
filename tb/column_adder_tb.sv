// column_adder_tb: test of one column adder with its carry circuit.
//
// Applies columns of ten decimal digits (all zero, all nine, every digit
// sum from 0 to 90, and random columns) and checks that the settled outputs
// give the biased column sum s = sum(d_k) + 9 as a = 3*(s mod 10) + 2,
// l = s div 10, b = 3*l + 2, with flt low. The L feedback loop has a unit
// delay; outputs are read SETTLE time units after the inputs change, and the
// test checks that they have stopped changing by then.
module column_adder_tb;
  import diamond_pkg::*;

  localparam int NN     = 10;
  localparam int SETTLE = 10;

  diamond_t [NN-1:0] f;
  diamond_t          a, b;
  logic [3:0]        l;
  logic              flt;
  int checks = 0, failures = 0;

  column_adder #(.N_NUMBERS(NN)) dut (.f(f), .a(a), .l(l), .b(b), .flt(flt));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int unsigned dg[NN]);
    int s;
    diamond_t a0;
    s = 9;
    for (int k = 0; k < NN; k++) begin
      f[k] = 5'(3 * dg[k] + 2);
      s += dg[k];
    end
    #SETTLE;
    a0 = a;
    #SETTLE;
    checks++;
    if (a != a0 || a != 5'(3 * (s % 10) + 2) || l != 4'(s / 10) ||
        b != 5'(3 * (s / 10) + 2) || flt) begin
      failures++;
      $display("FAIL column sum %0d: a=%0d l=%0d b=%0d flt=%b", s, a, l, b, flt);
    end
  endtask

  initial begin : main
    int unsigned dg [NN];
    for (int k = 0; k < NN; k++) dg[k] = 0;
    apply(dg);
    for (int k = 0; k < NN; k++) dg[k] = 9;
    apply(dg);
    // Every digit sum 0..90: fill the digits from the left.
    for (int t = 0; t <= 9 * NN; t++) begin
      int rest;
      rest = t;
      for (int k = 0; k < NN; k++) begin
        dg[k] = (rest > 9) ? 9 : rest;
        rest -= dg[k];
      end
      apply(dg);
    end
    for (int r = 0; r < 500; r++) begin
      for (int k = 0; k < NN; k++) dg[k] = $urandom_range(9);
      apply(dg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
