// tb_csa_array: checks the carry-save reduction array.
//
// Two instances, with the row counts the two multipliers use at 5 x 5:
// 6 rows (modified Baugh-Wooley) and 7 rows (conventional), both 10 bits
// wide. Random rows, all-ones rows and single-bit rows are applied; the
// check is that sum + carry equals the sum of all rows modulo 2^10, and
// that the carry vector's bit 0 is always zero (carries are shifted up).
module tb_csa_array;

  localparam int unsigned W = 10;

  logic [5:0][W-1:0] rows6;
  logic [6:0][W-1:0] rows7;
  logic [W-1:0]      sum6, carry6, sum7, carry7;
  int                checks = 0, failures = 0;

  csa_array #(.W(W), .ROWS(6)) dut6 (.rows(rows6), .sum(sum6), .carry(carry6));
  csa_array #(.W(W), .ROWS(7)) dut7 (.rows(rows7), .sum(sum7), .carry(carry7));

  task automatic apply_and_check();
    logic [W-1:0] exp6, exp7;
    #1;
    exp6 = '0;
    exp7 = '0;
    foreach (rows6[r]) exp6 += rows6[r];
    foreach (rows7[r]) exp7 += rows7[r];
    checks += 2;
    if (W'(sum6 + carry6) !== exp6 || carry6[0] !== 1'b0) begin
      failures++;
      $display("FAIL rows=6 sum=%h carry=%h exp=%h", sum6, carry6, exp6);
    end
    if (W'(sum7 + carry7) !== exp7 || carry7[0] !== 1'b0) begin
      failures++;
      $display("FAIL rows=7 sum=%h carry=%h exp=%h", sum7, carry7, exp7);
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
    rows6 = '0; rows7 = '0;
    apply_and_check();
    rows6 = '1; rows7 = '1;
    apply_and_check();
    // One bit at a time in each row and column.
    for (int r = 0; r < 7; r++) begin
      for (int k = 0; k < int'(W); k++) begin
        rows6 = '0; rows7 = '0;
        if (r < 6) rows6[r][k] = 1'b1;
        rows7[r][k] = 1'b1;
        apply_and_check();
      end
    end
    for (int n = 0; n < 3000; n++) begin
      foreach (rows6[r]) rows6[r] = W'($urandom);
      foreach (rows7[r]) rows7[r] = W'($urandom);
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_csa_array
