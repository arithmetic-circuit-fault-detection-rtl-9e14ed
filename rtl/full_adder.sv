// full_adder: the single full-adder cell from which every adder of the design
// is built.
//
// The three inputs c, d, e all carry the same weight 2^q; the sum a carries
// 2^q and the carry b carries 2^(q+1), so the cell output value is v = 2b + a.
// The cell is built from the gates named in its reference drawing: a NAND of
// c and d gives h, an XOR of c and d gives f, and f is combined with e. The
// gates that form g, b and a are not labelled in that drawing; here g is a
// NAND of f and e, b is a NAND of h and g, and a is an XOR of f and e, which
// is the standard realisation and makes the cell a full adder.
// With this structure a stuck-at fault on any one internal net changes v by
// 0, +-1 or +-2 but never by +-3, so an error at a cell output is always
// +-2^q or +-2^(q+1). That property is what makes the modulo-3 check of the
// Diamond Code catch every single fault in an adder network built from it.
//
// Purely combinational; no clock.
module full_adder (
  input  logic c,
  input  logic d,
  input  logic e,
  output logic a,   // sum,   weight 2^q
  output logic b    // carry, weight 2^(q+1)
);

  logic f, g, h;

  assign h = ~(c & d);   // NAND of c and d
  assign f = c ^ d;      // XOR of c and d
  assign g = ~(f & e);
  assign b = ~(h & g);
  assign a = f ^ e;

endmodule
