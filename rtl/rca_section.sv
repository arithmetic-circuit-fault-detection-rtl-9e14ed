// rca_section: one digit section AD^i of the ripple-carry adder that works
// directly in Diamond Code.
//
// Inputs are the digit a = 3A + 2, the carry digit b = 3C + 2 of the column
// to the right (both Diamond Code) and the binary ripple carry cin from the
// section to the right. A first row of five full adders forms
// S = a + b + cin (6 bits); cout = S[5], the ripple carry to the left, is
// known as soon as cin is. Since S = 3(A + C + cin) + 4 - 2*cin, a second row
// of four full adders brings S[4:0] back into code:
//   cout = 0:  x = S[4:0] + 2*cin + 30  (mod 32)
//   cout = 1:  x = S[4:0] + 2*cin       (mod 32)
// i.e. the row adds ~cout at weights 2, 4, 8 and 16 (30 = 11110b) and cin at
// weight 2; bit 0 of x is S[0]. The result is x = 3*((A + C + cin) mod 10) + 2.
// The carry out of the second row's top cell is 0 for valid inputs and is
// not used.
//
// The two rows and the correction follow the reference algorithm. Its
// drawing also shows a small extra input network for the ripple carry whose
// wiring is not specified; it is not reproduced. Here cin feeds both rows
// directly, so a stuck fault on that one wire moves x by a multiple of 3 and
// leaves it a valid (wrong) code word; faults on the other nets of the
// section give non-code words in almost all cases.
//
// Purely combinational; no clock.
module rca_section
  import diamond_pkg::*;
(
  input  diamond_t a,     // A^i, Diamond Code
  input  diamond_t b,     // B^(i-1), Diamond Code
  input  logic     cin,   // ripple carry c^(i-1)
  output diamond_t x,     // total digit x^i, Diamond Code
  output logic     cout   // ripple carry c^i
);

  logic [4:0] s;       // S[4:0]
  logic       ncout;

  // First row: S = a + b + cin; the carry of cell j enters cell j + 1.
  for (genvar j = 0; j < 5; j++) begin : g_row1
    logic ci, co;
    if (j == 0) begin : g_lsb
      assign ci = cin;
    end else begin : g_up
      assign ci = g_row1[j-1].co;
    end
    full_adder u_s (.c(a[j]), .d(b[j]), .e(ci), .a(s[j]), .b(co));
  end
  assign cout  = g_row1[4].co;
  assign ncout = ~cout;

  // Second row: x = S[4:0] + 2*cin + 30*~cout (mod 32). The carry out of
  // the top cell is 0 for code inputs and stays unconnected.
  assign x[0] = s[0];
  for (genvar j = 1; j < 5; j++) begin : g_row2
    logic ci, co;
    if (j == 1) begin : g_lsb
      assign ci = cin;
    end else begin : g_up
      assign ci = g_row2[j-1].co;
    end
    full_adder u_x (.c(s[j]), .d(ncout), .e(ci), .a(x[j]), .b(co));
  end

endmodule
