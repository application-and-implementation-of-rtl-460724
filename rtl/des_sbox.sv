// des_sbox -- one of the eight DES substitution boxes, 6 bits in, 4 bits out.
//
// The outer input bits (b1, b6) pick one of four rows and the inner four bits
// (b2..b5) one of sixteen columns of the box's fixed table; the entry is the
// output.  The box is written as a constant truth table indexed by the
// rearranged input, so synthesis reduces it to a two-level logic expression
// per output bit (the "expression" style of S-box, chosen for speed) rather
// than a ROM.  Purely combinational.
//
// Choosing logic expressions over a ROM follows the published design; the
// expressions themselves are left to synthesis, which is this implementation's
// choice.
//
// Interface: BOX (1..8) selects the table; x[5] is standard bit b1, x[0] is b6.
module des_sbox
  import des_pkg::*;
#(
  parameter int unsigned BOX = 1
) (
  input  logic [5:0] x,
  output logic [3:0] y
);

  initial assert (BOX >= 1 && BOX <= 8) else $error("des_sbox: BOX must be 1..8");

  always_comb y = SBOX_T[BOX-1][{x[5], x[0], x[4:1]}];

endmodule
