// bw_multiplier: N x N two's complement multiplier, conventional Baugh-Wooley.
//
// Product p = a * b of two signed N-bit numbers, full 2N-bit signed result.
// The conventional Baugh-Wooley matrix removes the negatively weighted terms
// by adding the operands' sign bits and their complements as extra entries:
//
//   row j < N-1 : a_i & b_j for i < N-1, and a_{N-1} & ~b_j at the top
//   row N-1     : ~a_i & b_{N-1} for i < N-1, and a_{N-1} & b_{N-1}
//   extra row A : a_{N-1} in column N-1, ~a_{N-1} in column 2N-2
//   extra row B : b_{N-1} in column N-1, ~b_{N-1} in column 2N-2, 1 in 2N-1
//
// This is the matrix of the published 5 x 5 worked examples (12 x 6 and the
// other sign combinations, all giving +-72). Column N-1 is two entries taller
// than in the modified form, which is what costs the conventional multiplier
// its extra adder delay. As in mbw_multiplier, the summing network is this
// design's choice: a linear carry-save array of full adder rows over the
// N+2 rows, then a ripple-carry adder.
// Combinational: no clock; p is valid one array delay after a and b change.
module bw_multiplier #(
  parameter int unsigned N = bw_pkg::MULT_N
) (
  input  logic [N-1:0]   a,  // multiplicand, two's complement
  input  logic [N-1:0]   b,  // multiplier, two's complement
  output logic [2*N-1:0] p   // product, two's complement
);

  localparam int unsigned W    = 2 * N;
  localparam int unsigned ROWS = N + 2;  // N partial product rows + rows A, B

  logic [ROWS-1:0][W-1:0] pp;
  logic [W-1:0]           vsum, vcarry;
  logic                   unused_cout;

  always_comb begin
    pp = '0;
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        if (i == N - 1 && j != N - 1)
          pp[j][i+j] = a[i] & ~b[j];
        else if (j == N - 1 && i != N - 1)
          pp[j][i+j] = ~a[i] & b[j];
        else
          pp[j][i+j] = a[i] & b[j];
      end
    end
    // Row A: sign bit of the multiplicand and its complement.
    pp[N][N-1]   = a[N-1];
    pp[N][W-2]   = ~a[N-1];
    // Row B: sign bit of the multiplier, its complement, and the top 1.
    pp[N+1][N-1] = b[N-1];
    pp[N+1][W-2] = ~b[N-1];
    pp[N+1][W-1] = 1'b1;
  end

  csa_array #(.W(W), .ROWS(ROWS)) u_csa (
    .rows (pp),
    .sum  (vsum),
    .carry(vcarry)
  );

  ripple_carry_adder #(.W(W)) u_cpa (
    .a   (vsum),
    .b   (vcarry),
    .cin (1'b0),
    .s   (p),
    .cout(unused_cout)
  );

endmodule : bw_multiplier
