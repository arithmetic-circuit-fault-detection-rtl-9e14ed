// decimal_adder_tb: end-to-end test of the Diamond Code decimal adder at its
// default size (ten numbers of ten digits plus sign).
//
// Part 1 applies directed and random sets of ten signed numbers and compares
// every total digit with a reference computed from the signed integer values
// (sum of the numbers in units of 10^-10, taken modulo 10^12 as
// tens-complement); every checker must say ok and no column may raise flt.
// The directed sets cover all-zero, all-maximum, all -1, mixed signs and
// carries that ripple through every section. It counts how often the
// mechanisms of the design occur: negative operands, negative and
// non-negative totals, ripple carries, column carries of 9, and the BIAS
// correction entering section 0.
//
// Part 2 injects single stuck-at faults with force on nets inside one column
// adder (carry-save nets, a final-row carry, the feedback tap M0, an output
// bit of R, the direct L3 wire into the carry circuit) and applies random sets.
// For every set whose total differs from the reference, the fault must be
// flagged by an ok going low or an flt going high. Each fault must have shown
// up at least once, and flt must have fired at least once.
//
// The design is combinational: each set is applied, then checked once the
// column adders' feedback loops have settled (SETTLE time units).
module decimal_adder_tb;
  import diamond_pkg::*;

  localparam int unsigned NN = 10;
  localparam int unsigned ND = 10;
  localparam longint unsigned MODV = 64'd1_000_000_000_000;   // 10^12
  // Settling time: each column adder's L feedback has a unit delay and
  // settles within three passes; allow ten.
  localparam int SETTLE = 10;

  diamond_t [NN-1:0][ND:0] d;
  diamond_t [ND+1:0]       x;
  logic     [ND+1:0]       ok;
  logic     [ND:0]         flt;

  decimal_adder dut (.d(d), .x(x), .ok(ok), .flt(flt));

  int checks = 0, failures = 0;
  int n_neg_in = 0, n_neg_out = 0, n_pos_out = 0, n_ripple = 0, n_c9 = 0;
  int n_bias = 0, n_flt = 0, n_detect = 0;

  int unsigned dig [NN][ND+1];

  // Signed value of number k in units of 10^-10.
  function automatic longint value_of(int k);
    longint v = 0;
    for (int i = ND - 1; i >= 0; i--) v = v * 10 + dig[k][i];
    if (dig[k][ND] == 9) v -= 64'sd10_000_000_000;
    return v;
  endfunction

  function automatic longint unsigned expected_total();
    longint s = 0;
    for (int k = 0; k < NN; k++) s += value_of(k);
    s = s % longint'(MODV);
    if (s < 0) s += longint'(MODV);
    return longint'(s);
  endfunction

  task automatic drive();
    for (int k = 0; k < NN; k++)
      for (int i = 0; i <= ND; i++) d[k][i] = encode(dig[k][i]);
  endtask

  // Returns 1 when the total equals the reference.
  function automatic bit total_matches(longint unsigned e);
    longint unsigned t = e;
    bit good = 1;
    for (int j = 0; j <= ND + 1; j++) begin
      if (x[j] != encode(int'(t % 10))) good = 0;
      t /= 10;
    end
    return good;
  endfunction

  task automatic check_set(string tag);
    longint unsigned e;
    drive();
    #SETTLE;
    e = expected_total();
    checks++;
    if (!total_matches(e) || ok != '1 || flt != '0) begin
      failures++;
      $display("FAIL %s: expected %0d, ok=%b flt=%b", tag, e, ok, flt);
    end
    for (int k = 0; k < NN; k++) if (dig[k][ND] == 9) n_neg_in++;
    if (decode(x[ND+1]) == 9) n_neg_out++; else n_pos_out++;
    n_ripple += $countones(dut.rc);
    for (int i = 0; i <= ND; i++) if (dut.col_b[i] == encode(9)) n_c9++;
    if (dut.col_a[0] == encode(9) && dut.rc[0]) n_bias++;
  endtask

  task automatic random_set(int unsigned max_digit);
    for (int k = 0; k < NN; k++) begin
      for (int i = 0; i < ND; i++) dig[k][i] = $urandom_range(max_digit);
      dig[k][ND] = ($urandom_range(1) == 1) ? 9 : 0;
    end
  endtask

  task automatic fill(int unsigned v, int unsigned s);
    for (int k = 0; k < NN; k++) begin
      for (int i = 0; i < ND; i++) dig[k][i] = v;
      dig[k][ND] = s;
    end
  endtask

  // Applies random sets under an injected fault; every wrong total must be
  // flagged. Returns how many sets showed the fault.
  task automatic faulty_sets(string tag, int n, output int seen);
    longint unsigned e;
    seen = 0;
    for (int r = 0; r < n; r++) begin
      random_set(9);
      drive();
      #SETTLE;
      e = expected_total();
      if (flt != '0) n_flt++;
      if (!total_matches(e)) begin
        seen++;
        checks++;
        if (ok == '1 && flt == '0) begin
          failures++;
          $display("FAIL fault %s undetected: expected %0d", tag, e);
        end else n_detect++;
      end
    end
    checks++;
    if (seen == 0) begin
      failures++;
      $display("FAIL fault %s never changed the total", tag);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int seen;
    // Directed sets.
    fill(0, 0); check_set("all zero");
    fill(9, 0); check_set("all 0.999..");
    fill(0, 9); check_set("all -1");
    fill(9, 9); check_set("all -1e-10");
    fill(0, 0); dig[0][0] = 1; check_set("single 1e-10");
    fill(0, 0); dig[0][ND] = 9; dig[1][0] = 1; check_set("-1 + 1e-10");
    fill(0, 0); for (int i = 0; i < ND; i++) dig[0][i] = 9; dig[1][0] = 1;
    check_set("0.99..9 + 1e-10");
    for (int r = 0; r < 2000; r++) begin random_set(9); check_set("random"); end
    for (int r = 0; r < 300; r++) begin random_set(3); check_set("small digits"); end

    // Single stuck-at faults in column 3.
    force dut.g_col[3].u_col.g_row[4].sv[2] = 1'b1;
    faulty_sets("carry-save sum net stuck HIGH", 200, seen);
    release dut.g_col[3].u_col.g_row[4].sv[2];
    force dut.g_col[3].u_col.g_row[7].cv[3] = 1'b0;
    faulty_sets("carry-save carry net stuck LOW", 200, seen);
    release dut.g_col[3].u_col.g_row[7].cv[3];
    force dut.g_col[3].u_col.g_ripple[4].cin = 1'b1;
    faulty_sets("final-row carry stuck HIGH", 200, seen);
    release dut.g_col[3].u_col.g_ripple[4].cin;
    force dut.g_col[3].u_col.g_row[10].sv[6] = 1'b0;
    faulty_sets("last carry-save sum net stuck LOW", 200, seen);
    release dut.g_col[3].u_col.g_row[10].sv[6];
    force dut.g_col[3].u_col.l_fb[0] = 1'b0;
    faulty_sets("feedback tap M0 stuck LOW", 200, seen);
    release dut.g_col[3].u_col.l_fb[0];
    force dut.g_col[3].u_col.t[1] = 1'b1;
    faulty_sets("output R1 stuck HIGH", 200, seen);
    release dut.g_col[3].u_col.t[1];
    force dut.g_col[3].u_col.g_row[5].cv[7] = 1'b1;
    faulty_sets("carry-save carry net of weight 128 stuck HIGH", 200, seen);
    release dut.g_col[3].u_col.g_row[5].cv[7];
    force dut.g_col[3].u_col.l[3] = 1'b1;
    faulty_sets("direct L3 into the carry circuit stuck HIGH", 200, seen);
    release dut.g_col[3].u_col.l[3];

    // Fault-free again after release.
    fill(9, 0); check_set("after release");

    $display("mechanisms: negative operands=%0d negative totals=%0d non-negative totals=%0d",
             n_neg_in, n_neg_out, n_pos_out);
    $display("mechanisms: ripple carries=%0d column carries of 9=%0d bias-correction carries=%0d",
             n_ripple, n_c9, n_bias);
    $display("mechanisms: detected faulty totals=%0d flt raised=%0d", n_detect, n_flt);
    checks++; if (n_neg_in  == 0) begin failures++; $display("FAIL no negative operand"); end
    checks++; if (n_neg_out == 0) begin failures++; $display("FAIL no negative total"); end
    checks++; if (n_pos_out == 0) begin failures++; $display("FAIL no non-negative total"); end
    checks++; if (n_ripple  == 0) begin failures++; $display("FAIL no ripple carry"); end
    checks++; if (n_c9      == 0) begin failures++; $display("FAIL no column carry 9"); end
    checks++; if (n_bias    == 0) begin failures++; $display("FAIL no bias carry"); end
    checks++; if (n_detect  == 0) begin failures++; $display("FAIL no detected fault"); end
    checks++; if (n_flt     == 0) begin failures++; $display("FAIL flt never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
