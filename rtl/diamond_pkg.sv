// diamond_pkg: types and constants shared by the Diamond Code decimal adder.
//
// A decimal digit d in 0..9 is carried on five wires as the binary number
// F = 3*d + 2 (the "Diamond Code", a Brown code F = p*d + q with p = 3, q = 2).
// Every valid word satisfies F mod 3 == 2, which is what the checkers test.
// The package holds the word type and two helper functions for encoding and
// decoding, used by testbenches and by constant expressions in the RTL.
package diamond_pkg;

  // Width of one Diamond Code word.
  localparam int unsigned DW = 5;

  // One decimal digit in Diamond Code, f[4] the most significant bit.
  typedef logic [DW-1:0] diamond_t;

  // Encoding of decimal digit d (0..9).
  function automatic diamond_t encode(input int unsigned d);
    return diamond_t'(3 * d + 2);
  endfunction

  // Decoding of a valid word; the result is meaningless for a non-code word.
  function automatic int unsigned decode(input diamond_t f);
    return (int'(f) - 2) / 3;
  endfunction

  // True for the ten valid words 2, 5, ..., 29.
  function automatic bit is_code(input diamond_t f);
    return (f >= 5'd2) && (f <= 5'd29) && ((f % 3) == 2);
  endfunction

endpackage
