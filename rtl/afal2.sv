// afal2: Approximate Full Adder Logic 2, multiplexer based.
//
// Two cascaded approximate half-adder sums (ORs) give x = a | b | c. The
// conventional half-adder carry of the operands, a & b, is used directly as
// the full-adder carry. A 2:1 multiplexer steered by that carry selects the
// sum: x when the carry is 0, the incoming carry c when it is 1.
// Errors (-1) occur for inputs 011 and 101, where the carry is missed.
// Purely combinational; the carry path is a single AND gate.
// Carry = a & b and the multiplexed sum follow the truth table and the
// logic diagram of the reference design.
module afal2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic ahasg1, ahasg2;  // cascaded approximate half-adder sums
  logic hacg;            // half-adder carry of the operands

  assign ahasg1 = a | b;
  assign ahasg2 = ahasg1 | c;
  assign hacg   = a & b;
  assign carry  = hacg;
  assign sum    = hacg ? c : ahasg2;

endmodule
