// approx_mul8_top: the two 8x8 approximate unsigned multipliers side by side.
//
// The design offers two alternative multipliers that share one structure
// (truncated low columns, gate-free compressors in the middle columns, AC6G
// compressors in the upper columns) and differ in the middle-column
// compressor family: proposed_mul1 uses ACFG I (constant-1 sums), proposed_mul2
// uses ACFG II. They are independent circuits; this top drives both from the
// same operands so that they can be compared, and brings out both products.
// An application would instantiate one of them.
//
// Interface: a, b unsigned 8-bit operands; p_mul1, p_mul2 the two approximate
// 16-bit products. Purely combinational, no clock.
module approx_mul8_top (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p_mul1,
  output logic [15:0] p_mul2
);

  proposed_mul1 u_mul1 (.a(a), .b(b), .p(p_mul1));
  proposed_mul2 u_mul2 (.a(a), .b(b), .p(p_mul2));

endmodule
