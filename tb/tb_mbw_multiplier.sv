// tb_mbw_multiplier: checks the modified Baugh-Wooley multiplier.
//
// Three instances: the 5 x 5 default, checked on all 1024 operand pairs
// and on the four signed worked examples (+-12 x +-6 = +-72); a 4 x 4
// instance, checked exhaustively; and an 8 x 8 instance, checked on the
// extreme operands and on random pairs. The reference is the product of the
// operands taken as signed integers. Each case is counted by operand signs,
// and a sign class that was never applied is counted as a failure.
module tb_mbw_multiplier;

  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int          checks = 0, failures = 0;
  int          sign_class[4];  // index {a negative, b negative}

  mbw_multiplier dut5 (.a(a5), .b(b5), .p(p5));
  mbw_multiplier #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));
  mbw_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));

  task automatic check5(input int x, input int y);
    int exp;
    a5 = 5'(x); b5 = 5'(y);
    #1;
    exp = int'($signed(a5)) * int'($signed(b5));
    checks++;
    sign_class[{a5[4], b5[4]}]++;
    if (p5 !== 10'(exp)) begin
      failures++;
      $display("FAIL N=5 %0d * %0d -> %0d (exp %0d)", $signed(a5), $signed(b5), $signed(p5), exp);
    end
  endtask

  task automatic check8(input logic [7:0] x, input logic [7:0] y);
    int exp;
    a8 = x; b8 = y;
    #1;
    exp = int'($signed(a8)) * int'($signed(b8));
    checks++;
    if (p8 !== 16'(exp)) begin
      failures++;
      $display("FAIL N=8 %0d * %0d -> %0d (exp %0d)", $signed(a8), $signed(b8), $signed(p8), exp);
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
    a4 = '0; b4 = '0; a8 = '0; b8 = '0;
    // Worked examples: all four sign combinations of 12 and 6.
    check5(12, 6);
    check5(-12, -6);
    check5(-12, 6);
    check5(12, -6);
    // Every 5-bit operand pair.
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        check5(x, y);
    // Every 4-bit operand pair.
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (p4 !== 8'(int'($signed(a4)) * int'($signed(b4)))) begin
        failures++;
        $display("FAIL N=4 %0d * %0d -> %0d", $signed(a4), $signed(b4), $signed(p4));
      end
    end
    // 8-bit extremes, then random pairs.
    check8(8'h80, 8'h80);
    check8(8'h80, 8'h7F);
    check8(8'h7F, 8'h7F);
    check8(8'hFF, 8'hFF);
    check8(8'h80, 8'h01);
    check8(8'h00, 8'h80);
    for (int n = 0; n < 4000; n++)
      check8(8'($urandom), 8'($urandom));
    foreach (sign_class[k]) begin
      checks++;
      if (sign_class[k] == 0) begin
        failures++;
        $display("FAIL sign class %0d never applied", k);
      end
    end
    $display("sign classes (+,+)=%0d (+,-)=%0d (-,+)=%0d (-,-)=%0d",
             sign_class[0], sign_class[1], sign_class[2], sign_class[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_mbw_multiplier
