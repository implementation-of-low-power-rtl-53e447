// mbw_multiplier: N x N two's complement multiplier, modified Baugh-Wooley.
//
// Product p = a * b, with a and b signed N-bit numbers and p the full 2N-bit
// signed product. The sign bits carry negative weight; the modified
// Baugh-Wooley form turns every negatively weighted partial product into a
// positively weighted complemented one, so the array adds positive bits only:
//
//   row j < N-1 : a_i & b_j for i < N-1, and ~(a_{N-1} & b_j) at the top
//   row N-1     : ~(a_i & b_{N-1}) for i < N-1, and a_{N-1} & b_{N-1}
//   constants   : a 1 in column N and a 1 in column 2N-1
//
// (for N = 5 the rows are a_i b_0 ... ~(a_4 b_0), shifted one column per row,
// the last row is ~(a_0 b_4) ... ~(a_3 b_4), a_4 b_4, with 1s at p5 and p9).
// The bit matrix and the two constant 1s follow the published 5 x 5 matrix.
// How the matrix is summed is this design's choice: the N partial product
// rows and the constant row go through a linear carry-save array of full
// adder rows, then a ripple-carry adder of full adders forms the product.
// Combinational: no clock; p is valid one array delay after a and b change.
module mbw_multiplier #(
  parameter int unsigned N = bw_pkg::MULT_N
) (
  input  logic [N-1:0]   a,  // multiplicand, two's complement
  input  logic [N-1:0]   b,  // multiplier, two's complement
  output logic [2*N-1:0] p   // product, two's complement
);

  localparam int unsigned W    = 2 * N;
  localparam int unsigned ROWS = N + 1;  // N partial product rows + constants

  logic [ROWS-1:0][W-1:0] pp;
  logic [W-1:0]           vsum, vcarry;
  logic                   unused_cout;

  // Partial product matrix, each row placed at its binary weight.
  always_comb begin
    pp = '0;
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        if ((i == N - 1) != (j == N - 1))
          pp[j][i+j] = ~(a[i] & b[j]);  // one sign bit: complemented
        else
          pp[j][i+j] = a[i] & b[j];     // no sign bit, or both
      end
    end
    pp[N][N]   = 1'b1;
    pp[N][W-1] = 1'b1;
  end

  csa_array #(.W(W), .ROWS(ROWS)) u_csa (
    .rows (pp),
    .sum  (vsum),
    .carry(vcarry)
  );

  // The carry out of the top column lies beyond the 2N-bit product.
  ripple_carry_adder #(.W(W)) u_cpa (
    .a   (vsum),
    .b   (vcarry),
    .cin (1'b0),
    .s   (p),
    .cout(unused_cout)
  );

endmodule : mbw_multiplier
