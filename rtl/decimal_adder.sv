// decimal_adder: single-fault-detecting parallel adder for N_NUMBERS signed
// decimal numbers, every digit carried in Diamond Code (F = 3d + 2).
//
// Number format: N_DIGITS significant digits after the decimal point plus a
// sign digit d^N_DIGITS in front of it, 0 for N >= 0 and 9 for N < 0
// (tens-complement, -1 <= N < 1). The total X has two digits in front of the
// point: x^(N_DIGITS+1) is the sign digit (0 or 9) and x^N_DIGITS is
// significant, so the sum of ten numbers never overflows.
//
// Structure. One column adder per digit position i = 0..N_DIGITS adds all
// N_NUMBERS digits of that column plus a BIAS digit 9, all columns at once,
// and gives the column sum as a digit A^i (Diamond Code) and a carry C^i
// (Diamond Code B^i). Adding 9 to every column adds the number -10^-N_DIGITS;
// that lets each column adder take its carry straight from the feedback L.
// A ripple-carry adder of N_DIGITS + 2 sections AD^j, also working in Diamond
// Code, then forms X = A + 10*C + 10^-N_DIGITS: section j adds A^j, B^(j-1)
// and the ripple carry c^(j-1). Section 0 adds the word for digit 1 in place
// of B^-1, which removes the bias; its ripple input is 0. The sign column is
// a copy of column N_DIGITS, so the top section adds A^N_DIGITS a second time
// together with B^N_DIGITS; its ripple carry out falls off the word
// (tens-complement arithmetic modulo 10^(N_DIGITS+2)).
//
// Fault detection. A code checker Q on every total digit raises ok[j] while
// x^j is a valid Diamond Code word. A single stuck-at fault in a column adder
// drives that column's A out of code and, through the ripple-carry adder,
// the matching total digit; flt[i] reports a column carry above 9 from a
// faulty column adder.
//
// Interface: d[k][i] is digit i of number k (i = N_DIGITS the sign digit);
// x[j] is total digit j (j = N_DIGITS + 1 the sign digit). Combinational:
// the total is valid once the column adders' feedback loops have settled
// (three unit delays in simulation) plus one ripple-add delay; no clock, no
// handshake. The column carries in binary (l of the column adders) are not
// needed here and stay unconnected; rc collects the ripple carries for
// observation only.
module decimal_adder
  import diamond_pkg::*;
#(
  parameter int unsigned N_NUMBERS = 10,   // numbers added at once
  parameter int unsigned N_DIGITS  = 10    // significant digits per number
) (
  input  diamond_t [N_NUMBERS-1:0][N_DIGITS:0] d,
  output diamond_t [N_DIGITS+1:0]              x,
  output logic     [N_DIGITS+1:0]              ok,
  output logic     [N_DIGITS:0]                flt
);

  diamond_t [N_DIGITS:0]   col_a;   // A^i
  diamond_t [N_DIGITS:0]   col_b;   // B^i = 3C^i + 2
  logic     [N_DIGITS+1:0] rc;      // ripple carries c^j

  // Column adders Sigma^0 .. Sigma^N_DIGITS.
  for (genvar i = 0; i <= N_DIGITS; i++) begin : g_col
    diamond_t [N_NUMBERS-1:0] f;
    for (genvar k = 0; k < N_NUMBERS; k++) begin : g_in
      assign f[k] = d[k][i];
    end
    column_adder #(.N_NUMBERS(N_NUMBERS)) u_col (
      .f  (f),
      .a  (col_a[i]),
      .l  (),
      .b  (col_b[i]),
      .flt(flt[i])
    );
  end

  // Ripple-carry adder AD^0 .. AD^(N_DIGITS+1). Section 0 takes the code
  // word of digit 1 (bias correction) and a ripple input of 0; the top
  // section adds the sign column, a copy of column N_DIGITS.
  for (genvar j = 0; j <= N_DIGITS + 1; j++) begin : g_ad
    diamond_t ad_a, ad_b;
    logic     cin, cout;
    if (j == 0) begin : g_lsb
      assign ad_a = col_a[0];
      assign ad_b = encode(1);
      assign cin  = 1'b0;
    end else begin : g_up
      assign ad_a = col_a[(j > N_DIGITS) ? N_DIGITS : j];
      assign ad_b = col_b[j-1];
      assign cin  = g_ad[j-1].cout;
    end
    rca_section u_ad (.a(ad_a), .b(ad_b), .cin(cin), .x(x[j]), .cout(cout));
    assign rc[j] = cout;
  end

  // Code checkers Q on every total digit.
  for (genvar j = 0; j <= N_DIGITS + 1; j++) begin : g_q
    diamond_checker u_q (.f(x[j]), .ok(ok[j]));
  end

endmodule
