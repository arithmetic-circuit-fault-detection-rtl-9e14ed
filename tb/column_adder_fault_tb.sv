// column_adder_fault_tb: single stuck-at fault campaign on one column adder.
//
// Every net of the full-adder network of a ten-digit column adder is forced
// stuck LOW and stuck HIGH in turn: the sum and carry vectors of all
// carry-save rows, the carries and outputs of the final ripple row, and the
// four feedback taps M0..M3. Under each fault, random columns are applied.
// After the settling time the outputs are sampled four more times: if they
// still change, the loop is oscillating under this fault and the set is
// counted as unsettled. For a settled set whose outputs (a, l) differ from
// the fault-free values, the digit word a must have left the Diamond Code
// or flt must be high; anything else is a failure. At the end the campaign
// must have produced detected errors, and every fault whose loop settled
// must either have shown an error or left the outputs correct.
module column_adder_fault_tb;
  import diamond_pkg::*;

  localparam int NN     = 10;
  localparam int W      = 9;
  localparam int SETTLE = 10;
  localparam int NVEC   = 40;
  // Site numbering: sv of row r bit i, cv of row r bit i, final-row carry
  // into bit i, output bit t[i], feedback tap l_fb[i].
  localparam int N_SV   = NN * W;
  localparam int N_CV   = NN * W;
  localparam int N_RC   = W - 1;
  localparam int N_T    = W;
  localparam int N_FB   = 4;
  localparam int N_SITE = N_SV + N_CV + N_RC + N_T + N_FB;

  diamond_t [NN-1:0] f;
  diamond_t          a, b;
  logic [3:0]        l;
  logic              flt;

  column_adder #(.N_NUMBERS(NN)) dut (.f(f), .a(a), .l(l), .b(b), .flt(flt));

  int  checks = 0, failures = 0;
  int  site = -1;
  bit  val;
  event do_force, do_release;

  // One forcing process per site.
  for (genvar r = 1; r <= NN; r++) begin : g_fr
    for (genvar i = 0; i < W; i++) begin : g_fi
      initial forever begin
        @(do_force);
        if (site == (r - 1) * W + i) begin
          if (val) force dut.g_row[r].sv[i] = 1'b1; else force dut.g_row[r].sv[i] = 1'b0;
          @(do_release);
          release dut.g_row[r].sv[i];
        end else if (site == N_SV + (r - 1) * W + i) begin
          if (val) force dut.g_row[r].cv[i+1] = 1'b1; else force dut.g_row[r].cv[i+1] = 1'b0;
          @(do_release);
          release dut.g_row[r].cv[i+1];
        end
      end
    end
  end
  for (genvar i = 1; i < W; i++) begin : g_frc
    initial forever begin
      @(do_force);
      if (site == N_SV + N_CV + i - 1) begin
        if (val) force dut.g_ripple[i].cin = 1'b1; else force dut.g_ripple[i].cin = 1'b0;
        @(do_release);
        release dut.g_ripple[i].cin;
      end
    end
  end
  for (genvar i = 0; i < W; i++) begin : g_ft
    initial forever begin
      @(do_force);
      if (site == N_SV + N_CV + N_RC + i) begin
        if (val) force dut.t[i] = 1'b1; else force dut.t[i] = 1'b0;
        @(do_release);
        release dut.t[i];
      end
    end
  end
  for (genvar i = 0; i < N_FB; i++) begin : g_ffb
    initial forever begin
      @(do_force);
      if (site == N_SV + N_CV + N_RC + N_T + i) begin
        if (val) force dut.l_fb[i] = 1'b1; else force dut.l_fb[i] = 1'b0;
        @(do_release);
        release dut.l_fb[i];
      end
    end
  end

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int n_faults = 0, n_effective = 0, n_silent = 0, n_osc_faults = 0;
    int n_detected = 0, n_unsettled = 0;
    #1;
    for (int s = 0; s < N_SITE; s++) begin
      for (int v = 0; v < 2; v++) begin
        bit effective, oscillated;
        effective = 0;
        oscillated = 0;
        site = s; val = 1'(v);
        ->do_force;
        #1;
        for (int n = 0; n < NVEC; n++) begin
          int sum;
          bit settled;
          diamond_t a0;
          logic [3:0] l0;
          sum = 9;
          settled = 1;
          for (int k = 0; k < NN; k++) begin
            int dg;
            dg = $urandom_range(9);
            f[k] = encode(dg);
            sum += dg;
          end
          #SETTLE;
          a0 = a; l0 = l;
          for (int p = 0; p < 4; p++) begin
            #1;
            if (a != a0 || l != l0) settled = 0;
          end
          if (!settled) begin
            n_unsettled++;
            oscillated = 1;
          end else if (a != encode(sum % 10) || l != 4'(sum / 10)) begin
            effective = 1;
            checks++;
            if (is_code(a) && !flt) begin
              failures++;
              $display("FAIL site %0d stuck %0d: wrong a=%0d l=%0d (sum %0d) not detected",
                       s, v, a, l, sum);
            end else n_detected++;
          end
        end
        ->do_release;
        #1;
        n_faults++;
        if (effective) n_effective++;
        else if (oscillated) n_osc_faults++;
        else n_silent++;
      end
    end
    $display("faults injected=%0d showed an error=%0d only oscillated=%0d never visible=%0d",
             n_faults, n_effective, n_osc_faults, n_silent);
    $display("erroneous settled outputs detected=%0d, unsettled sets=%0d", n_detected, n_unsettled);
    checks++;
    if (n_detected == 0) begin
      failures++;
      $display("FAIL no fault produced a detected error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
