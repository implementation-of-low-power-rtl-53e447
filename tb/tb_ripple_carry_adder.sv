// tb_ripple_carry_adder: checks the carry-propagate adder.
//
// A 10-bit instance (the product width of the 5 x 5 multiplier) gets the
// carry-chain corner cases (all ones plus one, alternating patterns) and
// random operands with random carry in; a 4-bit instance is checked
// exhaustively. {cout, s} is compared with the integer sum a + b + cin.
module tb_ripple_carry_adder;

  localparam int unsigned W = 10;

  logic [W-1:0] a, b, s;
  logic         cin, cout;
  logic [3:0]   a4, b4, s4;
  logic         cin4, cout4;
  int           checks = 0, failures = 0;

  ripple_carry_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  ripple_carry_adder #(.W(4)) dut4 (.a(a4), .b(b4), .cin(cin4), .s(s4), .cout(cout4));

  task automatic check10(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL W=%0d %0d + %0d + %0d -> %0d (exp %0d)", W, ta, tb_, tc, {cout, s}, exp);
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
    a4 = '0; b4 = '0; cin4 = 1'b0;
    check10('1, '0, 1'b1);
    check10('1, 10'd1, 1'b0);
    check10('1, '1, 1'b1);
    check10(10'h155, 10'h2AA, 1'b1);
    check10('0, '0, 1'b0);
    for (int k = 0; k < 2000; k++)
      check10(W'($urandom), W'($urandom), 1'($urandom));
    for (int v = 0; v < 512; v++) begin
      {cin4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({cout4, s4} !== 5'(int'(a4) + int'(b4) + int'(cin4))) begin
        failures++;
        $display("FAIL W=4 %0d + %0d + %0d -> %0d", a4, b4, cin4, {cout4, s4});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_ripple_carry_adder
