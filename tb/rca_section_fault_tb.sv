// rca_section_fault_tb: single stuck-at faults in one ripple-carry section.
//
// Each net of rca_section is forced stuck LOW and stuck HIGH in turn: the
// first-row carries and sums, the output bits, the second-row carries, the
// inverted carry out, and the incoming ripple carry cin (whose wire feeds
// both rows). For each fault all 200 code inputs (A, C in 0..9, cin 0/1) are
// applied and the wrong outputs are counted, split into those that left the
// Diamond Code (seen by a checker) and those that stayed valid words.
//
// What is required: with the fault-free section every result is right; for
// every fault on a first-row net, an output bit or the inverted carry, every
// wrong digit is a non-code word. Two sites are reported, not failed: the
// second-row carry into weight 8, which leaves a few wrong digits in code,
// and the incoming ripple carry, which moves the digit by a multiple of 3 and
// therefore always stays in code.
module rca_section_fault_tb;
  import diamond_pkg::*;

  // Sites: 0..4 first-row carries, 5..9 sums S[j], 10..14 outputs x[j],
  // 16..18 carries out of the second-row cells of weight 2, 4 and 8,
// 15 incoming cin, 20 ~cout.
  localparam int SITE_CIN  = 15;
  localparam int SITE_CY8  = 17;
  localparam int SITE_NCO  = 20;

  diamond_t a, b, x;
  logic     cin, cout;
  int checks = 0, failures = 0;
  int site = -1;
  bit val;
  event do_force, do_release;

  rca_section dut (.a(a), .b(b), .cin(cin), .x(x), .cout(cout));

  for (genvar j = 0; j < 5; j++) begin : g_f1
    initial forever begin
      @(do_force);
      if (site == j) begin
        if (val) force dut.g_row1[j].co = 1'b1; else force dut.g_row1[j].co = 1'b0;
        @(do_release);
        release dut.g_row1[j].co;
      end else if (site == 5 + j) begin
        if (val) force dut.s[j] = 1'b1; else force dut.s[j] = 1'b0;
        @(do_release);
        release dut.s[j];
      end else if (site == 10 + j) begin
        if (val) force dut.x[j] = 1'b1; else force dut.x[j] = 1'b0;
        @(do_release);
        release dut.x[j];
      end
    end
  end
  for (genvar j = 1; j < 4; j++) begin : g_f2
    initial forever begin
      @(do_force);
      if (site == 15 + j) begin
        if (val) force dut.g_row2[j].co = 1'b1; else force dut.g_row2[j].co = 1'b0;
        @(do_release);
        release dut.g_row2[j].co;
      end
    end
  end
  initial forever begin
    @(do_force);
    if (site == SITE_CIN) begin
      if (val) force dut.cin = 1'b1; else force dut.cin = 1'b0;
      @(do_release);
      release dut.cin;
    end else if (site == SITE_NCO) begin
      if (val) force dut.ncout = 1'b1; else force dut.ncout = 1'b0;
      @(do_release);
      release dut.ncout;
    end
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Applies all code inputs; counts wrong results and those still in code.
  task automatic sweep(output int wrong, output int in_code);
    wrong = 0;
    in_code = 0;
    for (int da = 0; da < 10; da++)
      for (int dc = 0; dc < 10; dc++)
        for (int ci = 0; ci < 2; ci++) begin
          int t;
          a = encode(da); b = encode(dc); cin = 1'(ci);
          #1;
          t = da + dc + ci;
          if (x != encode(t % 10) || cout != (t >= 10)) begin
            wrong++;
            if (is_code(x)) in_code++;
          end
        end
  endtask

  initial begin : main
    int wrong, in_code;
    #1;
    sweep(wrong, in_code);
    checks++;
    if (wrong != 0) begin
      failures++;
      $display("FAIL fault-free section gave %0d wrong results", wrong);
    end
    for (int s = 0; s <= SITE_NCO; s++) begin
      if (s == 19) continue;   // carry out of the top second-row cell: unconnected
      for (int v = 0; v < 2; v++) begin
        site = s; val = 1'(v);
        ->do_force;
        #1;
        sweep(wrong, in_code);
        ->do_release;
        #1;
        if (s == SITE_CIN || s == SITE_CY8) begin
          $display("site %0d stuck %0d: %0d wrong results, %0d of them valid code words",
                   s, v, wrong, in_code);
        end else begin
          checks++;
          if (wrong == 0 || in_code != 0) begin
            failures++;
            $display("FAIL site %0d stuck %0d: %0d wrong results, %0d valid code words",
                     s, v, wrong, in_code);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
