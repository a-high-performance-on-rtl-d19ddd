// afal3: Approximate Full Adder Logic 3.
//
// The carry output is operand bit a itself (a buffer), which makes the
// carry path as short as it can be. The sum is precomputed both ways from
// b and c: x = b | c (approximate half-adder sum) and y = b & c
// (half-adder carry); a 2:1 multiplexer selected by a picks x when a = 0
// and y when a = 1. Errors: 011 gives -1 and 100 gives +1, the sum error
// partly compensating the carry error. Purely combinational.
// Function and structure follow the reference design.
module afal3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic x, y;

  assign x     = b | c;
  assign y     = b & c;
  assign carry = a;
  assign sum   = a ? y : x;

endmodule
