// diamond_checker: the code checker Q of the Diamond Code decimal adder.
//
// ok is 1 only when the 5-bit input f is one of the ten Diamond Code words
// F = 3d + 2 (2, 5, 8, ..., 29). The test: form G from F by inverting f3 and
// f1; F is a code word exactly when G has one or four zeros, i.e. one or four
// ones. Two full adders count the ones of G: the first adds f4, ~f3 and f2,
// the second adds the first one's sum bit with ~f1 and f0. The count is
// 2*(k1 + k2) + s2, so one 1 means s2 = 1, k1 = k2 = 0 and four 1s mean
// s2 = 0, k1 = k2 = 1. The use of two full adders and of the two inverters
// follows the reference drawing; the gates that combine s2, k1 and k2 into
// ok are written here as the sum of those two products, as the drawing
// names no gate type for them.
//
// Purely combinational; no clock.
module diamond_checker
  import diamond_pkg::*;
(
  input  diamond_t f,
  output logic     ok
);

  logic s1, k1, s2, k2;

  full_adder u_fa_hi (.c(f[4]), .d(~f[3]), .e(f[2]),  .a(s1), .b(k1));
  full_adder u_fa_lo (.c(s1),   .d(~f[1]), .e(f[0]),  .a(s2), .b(k2));

  assign ok = (s2 & ~k1 & ~k2) | (~s2 & k1 & k2);

endmodule
