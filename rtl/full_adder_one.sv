// full_adder_one: full adder whose third input is the constant 1.
// a + b + 1 gives s = ~(a ^ b) and c = a | b: one XNOR (an XOR and the
// inverted output) and one OR gate. The first multiplier uses it in the final
// addition of the columns whose ACFG I sum bit is always 1.
// Purely combinational.
module full_adder_one (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = ~(a ^ b);
  assign c = a | b;
endmodule
