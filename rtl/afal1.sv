// afal1: Approximate Full Adder Logic 1.
//
// The carry is the exact majority function of the three inputs, built from
// three two-input ANDs and an OR tree; the sum is simply the complement of
// that carry. This is wrong only for inputs 000 (sum 1, error +1) and 111
// (sum 0, error -1); the carry is always exact. a and b are the operand
// bits, c the carry from the previous stage. Purely combinational: the
// carry path is two gate levels, the sum adds one inverter.
// The logic is the reference design's; the gate grouping of the OR tree is
// this design's choice.
module afal1 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic ab, bc, ac;

  assign ab    = a & b;
  assign bc    = b & c;
  assign ac    = a & c;
  assign carry = ab | (bc | ac);
  assign sum   = ~carry;

endmodule
