// and_or_gate: the AND-OR gate block used twice inside AFAL4.
//
// One two-input OR and one two-input AND share the same pair of inputs:
// o_or = a | b (the block's Oo output) and o_and = a & b (its Ao output).
// Purely combinational. The function and the output names follow the
// reference design; nothing here is a local choice.
module and_or_gate (
  input  logic a,
  input  logic b,
  output logic o_or,   // Oo
  output logic o_and   // Ao
);

  assign o_or  = a | b;
  assign o_and = a & b;

endmodule
