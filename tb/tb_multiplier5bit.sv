// tb_multiplier5bit: end-to-end test of the 5 x 5 multiplier top level.
//
// The top runs at its default parameters (5-bit operands, 10-bit products).
// Pass 1 drives every operand pair into the modified Baugh-Wooley multiplier
// while the conventional one gets a different pair at the same time, and
// checks both against the signed integer product. Pass 2 drives the same
// pair into both and checks that they agree. It then replays the four
// signed worked examples (+-12 x +-6) and the full set of negative x
// negative pairs, where the product must be positive (sign bit p[9] = 0).
// Counted events: each operand sign class on each multiplier, the worked
// examples, the most negative operand squared (-16 x -16 = 256, the one
// product that needs bit 8 with p[9] = 0), a zero operand, and the negative
// x negative set; an event that never happened counts as a failure.
module tb_multiplier5bit;

  logic [4:0] x, y, bw_x, bw_y;
  logic [9:0] p, bw_p;
  int         checks = 0, failures = 0;
  int         mbw_class[4], bw_class[4];
  localparam int EX_A[4] = '{12, -12, -12, 12};
  localparam int EX_B[4] = '{6, -6, 6, -6};
  localparam int EX_P[4] = '{72, 72, -72, -72};
  int         n_examples = 0, n_min_squared = 0, n_zero = 0, n_negneg = 0;

  multiplier5bit dut (
    .x(x), .y(y), .p(p),
    .bw_x(bw_x), .bw_y(bw_y), .bw_p(bw_p)
  );

  function automatic logic [9:0] ref_mul(input logic [4:0] u, input logic [4:0] v);
    return 10'(int'($signed(u)) * int'($signed(v)));
  endfunction

  // Applies one pair to each multiplier and checks both products.
  task automatic apply(input logic [4:0] mx, input logic [4:0] my,
                       input logic [4:0] cx, input logic [4:0] cy);
    x = mx; y = my; bw_x = cx; bw_y = cy;
    #1;
    checks += 2;
    mbw_class[{mx[4], my[4]}]++;
    bw_class[{cx[4], cy[4]}]++;
    if (mx == 5'h10 && my == 5'h10) n_min_squared++;
    if (mx == '0 || my == '0) n_zero++;
    if (p !== ref_mul(mx, my)) begin
      failures++;
      $display("FAIL modified   %0d * %0d -> %0d", $signed(mx), $signed(my), $signed(p));
    end
    if (bw_p !== ref_mul(cx, cy)) begin
      failures++;
      $display("FAIL conventional %0d * %0d -> %0d", $signed(cx), $signed(cy), $signed(bw_p));
    end
  endtask

  task automatic require(input int count, input string what);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Pass 1: different operands on the two multipliers.
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        apply(5'(i), 5'(j), 5'(31 - i), 5'(j) ^ 5'h15);

    // Pass 2: the same operands on both; the products must agree.
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        apply(5'(i), 5'(j), 5'(i), 5'(j));
        checks++;
        if (p !== bw_p) begin
          failures++;
          $display("FAIL products differ for %0d * %0d", $signed(x), $signed(y));
        end
      end

    // Worked examples: 12 x 6 in all four sign combinations gives +-72.
    begin
      for (int k = 0; k < 4; k++) begin
        apply(5'(EX_A[k]), 5'(EX_B[k]), 5'(EX_A[k]), 5'(EX_B[k]));
        checks++;
        if ($signed(p) != 10'(EX_P[k])) begin
          failures++;
          $display("FAIL example %0d * %0d -> %0d", EX_A[k], EX_B[k], $signed(p));
        end
        n_examples++;
      end
    end

    // Both operands negative: the product is positive, sign bit clear.
    for (int i = -16; i < 0; i++)
      for (int j = -16; j < 0; j++) begin
        apply(5'(i), 5'(j), 5'(j), 5'(i));
        checks++;
        if (p[9] !== 1'b0 || bw_p[9] !== 1'b0) begin
          failures++;
          $display("FAIL negative x negative %0d * %0d has sign bit set", i, j);
        end
        n_negneg++;
      end

    $display("events:");
    require(mbw_class[0], "modified: positive x positive");
    require(mbw_class[1], "modified: positive x negative");
    require(mbw_class[2], "modified: negative x positive");
    require(mbw_class[3], "modified: negative x negative");
    require(bw_class[0], "conventional: positive x positive");
    require(bw_class[1], "conventional: positive x negative");
    require(bw_class[2], "conventional: negative x positive");
    require(bw_class[3], "conventional: negative x negative");
    require(n_examples, "worked examples");
    require(n_min_squared, "-16 x -16");
    require(n_zero, "zero operand");
    require(n_negneg, "negative x negative set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_multiplier5bit
