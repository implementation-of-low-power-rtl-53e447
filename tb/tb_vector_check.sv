// tb_vector_check: per-output-bit vector check of the 5 x 5 multiplier.
//
// Runs the top level at its default size on test vector sets grouped by
// operand signs (both positive, both negative, negative x positive,
// positive x negative; every pair of each set) and reports, for each
// product bit p[k], how many vectors were checked, how many expected zeros
// and ones were matched and how many errors occurred, in the manner of a
// vector-file comparison report. Both the modified and the conventional
// multiplier see the same vectors. Expected values are the signed integer
// products.
module tb_vector_check;

  localparam int N = 5;
  localparam int W = 2 * N;

  logic [N-1:0] x, y;
  logic [W-1:0] p, bw_p;
  int           checks = 0, failures = 0;
  int           vectors;
  int           zeros[W], ones[W], errors[W];
  logic [W-1:0] exp;

  multiplier5bit dut (
    .x(x), .y(y), .p(p),
    .bw_x(x), .bw_y(y), .bw_p(bw_p)
  );

  // Runs one vector set: x in [xlo, xhi], y in [ylo, yhi].
  task automatic run_set(input string name, input int xlo, input int xhi,
                         input int ylo, input int yhi);
    foreach (zeros[k]) begin
      zeros[k] = 0; ones[k] = 0; errors[k] = 0;
    end
    for (int i = xlo; i <= xhi; i++)
      for (int j = ylo; j <= yhi; j++) begin
        x = N'(i); y = N'(j);
        #1;
        exp = W'(i * j);
        for (int k = 0; k < W; k++) begin
          checks++;
          if (p[k] !== exp[k] || bw_p[k] !== exp[k]) begin
            errors[k]++;
            failures++;
          end else if (exp[k]) ones[k]++;
          else zeros[k]++;
        end
      end
    vectors = zeros[0] + ones[0] + errors[0];
    $display("vector set: %s, %0d vectors", name, vectors);
    for (int k = 0; k < W; k++)
      $display("  p<%0d>: checks=%0d zeros matched=%0d ones matched=%0d errors=%0d",
               k, vectors, zeros[k], ones[k], errors[k]);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_set("both positive", 0, 15, 0, 15);
    run_set("both negative", -16, -1, -16, -1);
    run_set("negative x positive", -16, -1, 0, 15);
    run_set("positive x negative", 0, 15, -16, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_vector_check
