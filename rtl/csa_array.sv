// csa_array: carry-save reduction of the partial product rows.
//
// Takes ROWS rows of W bits each (already placed at their binary weight) and
// reduces them to two vectors, sum and carry, whose sum equals the sum of all
// rows modulo 2^W. It is a linear array: the first carry-save row of W full
// adders adds rows 0, 1 and 2; each following row adds the next partial
// product row to the running sum and the running carry shifted up by one
// place. ROWS-2 carry-save rows are used. The carry out of the top bit of
// each row is dropped, as the product is taken modulo 2^W.
// The carry output is already shifted into place: sum + carry is the total.
// Combinational; the depth is ROWS-2 full-adder delays.
// Lint reports the top carry bit of each row as unused: it has weight 2^W,
// outside the result, and is left unconnected on purpose.
module csa_array #(
  parameter int unsigned W    = 2 * bw_pkg::MULT_N,
  parameter int unsigned ROWS = bw_pkg::MULT_N + 1
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);

  // Running sum and shifted carry after each carry-save row. Stage 0 holds
  // rows 0 and 1 unreduced; stage k+1 is the output of carry-save row k.
  logic [ROWS-2:0][W-1:0] s_st;
  logic [ROWS-2:0][W-1:0] c_st;

  assign s_st[0] = rows[0];
  assign c_st[0] = rows[1];

  for (genvar r = 0; r < ROWS - 2; r++) begin : g_row
    logic [W-1:0] co;
    for (genvar k = 0; k < W; k++) begin : g_bit
      full_adder u_fa (
        .a   (s_st[r][k]),
        .b   (c_st[r][k]),
        .cin (rows[r+2][k]),
        .s   (s_st[r+1][k]),
        .cout(co[k])
      );
    end
    // Carries move one column up; the carry out of the top column is
    // beyond the product width and is dropped.
    assign c_st[r+1] = {co[W-2:0], 1'b0};
  end

  assign sum   = s_st[ROWS-2];
  assign carry = c_st[ROWS-2];

endmodule : csa_array
