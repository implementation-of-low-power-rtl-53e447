// full_adder: the one adding cell the Baugh-Wooley arrays are built from.
//
// A "type 0" full adder: all three inputs carry positive weight, so
// s = a ^ b ^ cin and cout = majority(a, b, cin). Because the Baugh-Wooley
// bit matrix holds only positively weighted bits, no other adder type is
// needed anywhere in the multipliers. Purely combinational, no timing state.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule : full_adder
