// bw_pkg: constants shared by the Baugh-Wooley multipliers.
//
// MULT_N is the operand width of the multiplier the design is built around:
// a 5-bit x 5-bit two's complement multiplier with a 10-bit product. Every
// module takes its width as a parameter whose default comes from here.
package bw_pkg;

  // Operand width in bits (5 x 5 multiplier, 10-bit product).
  localparam int unsigned MULT_N = 5;

endpackage : bw_pkg
