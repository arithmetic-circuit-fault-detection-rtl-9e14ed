// full_adder_tb: exhaustive test of the full-adder cell.
//
// For all eight input combinations the outputs must satisfy
// 2b + a = c + d + e. Then each internal or output net (f, g, h, a, b) is
// forced stuck LOW and stuck HIGH in turn; for every input combination the
// change of v = 2b + a against the fault-free value must never be +-3, the
// property on which the fault detection of the whole adder rests.
module full_adder_tb;

  logic c, d, e, a, b;
  int checks = 0, failures = 0;

  full_adder dut (.c(c), .d(d), .e(e), .a(a), .b(b));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Applies fault (net, value) or none (net < 0) to all inputs and checks
  // the change of the output value against the sum.
  task automatic sweep(int net, bit val);
    for (int v = 0; v < 8; v++) begin
      int good, got, dv;
      {c, d, e} = 3'(v);
      good = int'(c) + int'(d) + int'(e);
      case (net)
        0: force dut.f = val;
        1: force dut.g = val;
        2: force dut.h = val;
        3: force dut.a = val;
        4: force dut.b = val;
        default: ;
      endcase
      #1;
      got = 2 * int'(b) + int'(a);
      dv = got - good;
      checks++;
      if (net < 0 && dv != 0) begin
        failures++;
        $display("FAIL c=%b d=%b e=%b: v=%0d expected %0d", c, d, e, got, good);
      end
      if (net >= 0 && (dv == 3 || dv == -3)) begin
        failures++;
        $display("FAIL fault on net %0d stuck %b, inputs %03b: change of v is %0d", net, val, v[2:0], dv);
      end
      case (net)
        0: release dut.f;
        1: release dut.g;
        2: release dut.h;
        3: release dut.a;
        4: release dut.b;
        default: ;
      endcase
      #1;
    end
  endtask

  initial begin : main
    sweep(-1, 1'b0);
    for (int n = 0; n < 5; n++) begin
      sweep(n, 1'b0);
      sweep(n, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
