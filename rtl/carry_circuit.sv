// carry_circuit: the carry circuit CC that re-encodes a column carry from
// binary into Diamond Code.
//
// A column adder delivers its decimal carry C as the 4-bit binary number
// L = C. The ripple-carry adder needs it as the Diamond Code word
// B = 3L + 2 = L + 2L + 2. Bit 0 of B is L0; the other bits come from a
// chain of four full adders: weight 2 adds L1, 2L0 and the constant +2;
// weight 4 adds L2, 2L1 and the carry; weight 8 adds L3, 2L2 and the carry;
// weight 16 adds 2L3, a constant LOW and the carry. The carry out of the last
// cell (weight 32) is flt: it rises only when B would exceed 31, i.e. when a
// faulty column adder produced L above 9.
//
// The two copies of L arrive on separate ports. l is taken straight from the
// column adder's output wires; l_fb, used for the 2L terms, is taken from the
// column adder's feedback taps M0..M3. A fault on a shared wire would move B
// by a multiple of 3 and keep it a valid code word; routing the 2L copy through
// the taps puts any such fault into the column adder sum as well, where the
// code check of the digit A catches it. With l == l_fb, b = 3l + 2.
//
// Purely combinational; no clock.
module carry_circuit
  import diamond_pkg::*;
(
  input  logic [3:0] l,      // L straight from the column adder outputs
  input  logic [3:0] l_fb,   // L through the feedback taps M0..M3
  output diamond_t   b,      // B = 3L + 2
  output logic       flt     // B overflow (L above 9)
);

  logic k2, k3, k4;

  assign b[0] = l[0];
  full_adder u_fa1 (.c(l[1]),    .d(l_fb[0]), .e(1'b1), .a(b[1]), .b(k2));
  full_adder u_fa2 (.c(l[2]),    .d(l_fb[1]), .e(k2),   .a(b[2]), .b(k3));
  full_adder u_fa3 (.c(l[3]),    .d(l_fb[2]), .e(k3),   .a(b[3]), .b(k4));
  full_adder u_fa4 (.c(l_fb[3]), .d(1'b0),    .e(k4),   .a(b[4]), .b(flt));

endmodule
