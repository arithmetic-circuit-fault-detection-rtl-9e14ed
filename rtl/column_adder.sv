// column_adder: column adder Sigma^i with its carry circuit CC.
//
// Adds one column of N_NUMBERS decimal digits, each given in Diamond Code
// F_k = 3*d_k + 2, and produces the column sum sum(d_k) + 9 as two decimal
// digits: A (the digit, in Diamond Code) and C (the carry, in binary and in
// Diamond Code). The +9 is the adder's BIAS: every column also adds a digit 9,
// which with N_NUMBERS = 10 keeps the column sum at most 99.
//
// How it works. A network made only of full adders forms the 9-bit total
//   T = F_1 + ... + F_N + BIAS + 2L,   T = (R8 .. R0),  L = (R8 R7 R6 R5)
// where L, the top four bits of T, is fed back into the network one place up
// (L_t enters at weight 2^(t+1)). The loop settles at
//   BIAS + sum(F_k) = 30L + R,  0 <= R <= 29
// and with BIAS = 29 - 2N (9 for N = 10, wired as constant HIGH inputs at
// weights 1 and 8) that gives C = L and R = 3A + 2, so R is the digit A
// already in Diamond Code. The network is a carry-save array: the first row
// of full adders adds three operands, each further row adds one more operand
// to the sum and carry vectors, and a final row of full adders ripples the
// two vectors together. Full-adder inputs that have nothing to add are tied
// LOW. Every net of the network feeds exactly one full-adder input, so a
// single stuck-at fault moves T by +-2^h, which is never a multiple of 3:
// R then leaves the Diamond Code and a code checker on A detects the fault.
// The feedback leaves the network through the taps M0..M3 (l_fb below); the
// carry circuit takes its 2L terms from these taps, so that a fault on them
// also disturbs R.
//
// The feedback and the BIAS follow the reference design; the exact tree of
// full adders is this design's own (any full-adder network adding the same
// operands keeps the fault-detection property). The feedback of L makes the
// network a combinational loop on purpose, and lint tools report it as one.
// For fault-free inputs the loop has exactly one stable state and reaches it
// from any starting value of L, since T(L) grows by 2 per unit of L while the
// bits taken as L count 32: starting from any L it is exact after at most
// three passes through the network. The feedback wires carry a unit
// transport delay (#1), which synthesis ignores; in simulation it makes each
// pass round the loop a full, settled evaluation of the network, as in the
// real circuit, instead of a zero-delay loop the simulator cannot order.
// Outputs are therefore valid three time units after the inputs change.
// Some single faults on the L wires themselves leave the loop without a
// stable state; it then oscillates instead of settling.
//
// Unused nets: the carry out of the top bit of each row and of the final
// row is always LOW for valid inputs and goes nowhere.
//
// Interface: f[k] is digit k of the column; a = R = 3A + 2; l = C in binary;
// b = 3C + 2; flt is the carry-circuit overflow (C above 9, only under a
// fault). Combinational apart from the settling of the loop; no clock.
module column_adder
  import diamond_pkg::*;
#(
  parameter int unsigned N_NUMBERS = 10   // digits added per column (1..10)
) (
  input  diamond_t [N_NUMBERS-1:0] f,
  output diamond_t                 a,     // R = 3A + 2
  output logic     [3:0]           l,     // L = C
  output diamond_t                 b,     // B = 3C + 2
  output logic                     flt
);

  localparam int unsigned W     = 9;                  // width of T
  localparam int unsigned NOPS  = N_NUMBERS + 2;      // digits, BIAS, 2L
  localparam int unsigned NROWS = NOPS - 2;           // carry-save rows
  localparam logic [W-1:0] BIAS = W'(29 - 2 * N_NUMBERS);

  if (N_NUMBERS < 1 || N_NUMBERS > 10) begin : g_bad_n
    $error("column_adder: N_NUMBERS must lie in 1..10 so that the column sum stays below 100");
  end

  logic [NOPS-1:0][W-1:0] op;       // operands, zero-extended to W bits
  logic [W-1:0]           t;        // total T
  logic [3:0]             l_fb;     // feedback taps M0..M3

  for (genvar k = 0; k < N_NUMBERS; k++) begin : g_ops
    assign op[k] = W'(f[k]);
  end
  assign op[N_NUMBERS]     = BIAS;
  assign op[N_NUMBERS + 1] = {4'b0000, l_fb, 1'b0};

  // Carry-save rows. Row 1 adds operands 0, 1 and 2; row r > 1 adds operand
  // r + 1 to the sum vector sv and carry vector cv of row r - 1. Each row
  // keeps its own vectors so that no net is both read and written by one row.
  for (genvar r = 1; r <= NROWS; r++) begin : g_row
    logic [W-1:0] sv;    // sum outputs, weight 2^i
    logic [W:0]   cv;    // carry outputs, weight 2^i (bit 0 LOW, bit W unused)
    assign cv[0] = 1'b0;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (r == 1) begin : g_first
        full_adder u_fa (.c(op[0][i]), .d(op[1][i]), .e(op[2][i]),
                         .a(sv[i]), .b(cv[i+1]));
      end else begin : g_next
        full_adder u_fa (.c(g_row[r-1].sv[i]), .d(g_row[r-1].cv[i]), .e(op[r+1][i]),
                         .a(sv[i]), .b(cv[i+1]));
      end
    end
  end

  // Final row: ripple the last sum and carry vectors together.
  for (genvar i = 0; i < W; i++) begin : g_ripple
    logic cin, cout;
    if (i == 0) begin : g_lsb
      assign cin = 1'b0;
    end else begin : g_up
      assign cin = g_ripple[i-1].cout;
    end
    full_adder u_fa (.c(g_row[NROWS].sv[i]), .d(g_row[NROWS].cv[i]), .e(cin),
                     .a(t[i]), .b(cout));
  end

  assign a    = t[4:0];
  assign l    = t[8:5];
  assign #1 l_fb = t[8:5];   // unit transport delay on the feedback wires

  carry_circuit u_cc (.l(l), .l_fb(l_fb), .b(b), .flt(flt));

endmodule
