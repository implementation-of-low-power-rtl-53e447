// multiplier5bit: 5 x 5 two's complement multiplier, top level.
//
// The main datapath is the modified Baugh-Wooley multiplier: x and y are
// 5-bit two's complement operands and p their 10-bit two's complement
// product, the port names and widths of the published 5-bit multiplier cell
// (x<4:0>, y<4:0>, p<9:0>). Beside it, with its own ports, stands the
// conventional Baugh-Wooley multiplier (bw_x, bw_y, bw_p), the design the
// modified form improves on, so that both can be simulated and synthesized
// together. The two share no logic.
// Purely combinational: no clock and no reset; outputs follow inputs after
// the array delay.
module multiplier5bit #(
  parameter int unsigned N = bw_pkg::MULT_N
) (
  input  logic [N-1:0]   x,     // modified Baugh-Wooley multiplicand
  input  logic [N-1:0]   y,     // modified Baugh-Wooley multiplier
  output logic [2*N-1:0] p,     // modified Baugh-Wooley product
  input  logic [N-1:0]   bw_x,  // conventional Baugh-Wooley multiplicand
  input  logic [N-1:0]   bw_y,  // conventional Baugh-Wooley multiplier
  output logic [2*N-1:0] bw_p   // conventional Baugh-Wooley product
);

  mbw_multiplier #(.N(N)) u_mbw (
    .a(x),
    .b(y),
    .p(p)
  );

  bw_multiplier #(.N(N)) u_bw (
    .a(bw_x),
    .b(bw_y),
    .p(bw_p)
  );

endmodule : multiplier5bit
