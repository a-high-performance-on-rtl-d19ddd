// afal4: Approximate Full Adder Logic 4.
//
// Two AND-OR gate blocks in cascade: the first takes b and c and gives
// b | c and b & c; the second takes a and b | c and gives the carry
// a & (b | c) and the OR of all three inputs. A 2:1 multiplexer steered by
// the carry selects the sum: a | b | c when the carry is 0, b & c when it
// is 1. Only input 011 is wrong (error -1). Purely combinational; two gate
// levels on the carry path.
// Structure and truth table follow the reference design.
module afal4 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic bc_or, bc_and;  // first AND-OR block: b | c, b & c
  logic m0;             // a | b | c, multiplexer input 0

  and_or_gate u_ao_bc (
    .a    (b),
    .b    (c),
    .o_or (bc_or),
    .o_and(bc_and)
  );

  and_or_gate u_ao_a (
    .a    (a),
    .b    (bc_or),
    .o_or (m0),
    .o_and(carry)
  );

  assign sum = carry ? bc_and : m0;

endmodule
