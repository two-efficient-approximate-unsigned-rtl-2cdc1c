// half_adder_one: half adder whose second input is the constant 1.
// Adding 1 to a single bit a gives s = ~a and c = a, so the cell is one
// inverter. The first multiplier uses it where an ACFG I compressor's
// constant-1 sum meets a single carry bit in the final addition.
// Purely combinational.
module half_adder_one (
  input  logic a,
  output logic s,
  output logic c
);
  assign s = ~a;
  assign c = a;
endmodule
