// half_adder: exact half adder, s = a ^ b, c = a & b.
// Used in the exact upper columns (13 and 15 of the multipliers, counting
// from 1 at the least significant bit) and as the first cell of the second
// multiplier's final adder. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
