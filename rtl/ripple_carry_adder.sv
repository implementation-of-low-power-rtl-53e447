// ripple_carry_adder: the final carry-propagate adder of the multipliers.
//
// W full adders in a chain: bit k adds a[k], b[k] and the carry of bit k-1,
// with cin entering bit 0. The carry ripples from the least to the most
// significant bit, which is the long path of the multiplier (from an operand
// bit through the carry-save rows and along this chain to the upper product
// bits). The ripple structure is this design's choice for the last addition;
// it keeps the array built from full adder cells only.
// Combinational: s and cout settle W full-adder delays after the inputs.
module ripple_carry_adder #(
  parameter int unsigned W = 2 * bw_pkg::MULT_N
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < W; k++) begin : g_bit
    full_adder u_fa (
      .a   (a[k]),
      .b   (b[k]),
      .cin (c[k]),
      .s   (s[k]),
      .cout(c[k+1])
    );
  end

  assign cout = c[W];

endmodule : ripple_carry_adder
