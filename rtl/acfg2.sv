// acfg2: gate-free approximate 4:2 compressor, variant ACFG II-N (N = 1..12).
//
// The sum output is one input and the carry output another; the remaining
// two inputs are not used. The twelve variants are the twelve ordered pairs of
// distinct inputs, taken from the published table of ACFG II compressors (see
// approx_mul_pkg). The default N = 1 (sum = x1, carry = x2) is the variant
// used most in the second multiplier (proposed_mul2). An all-zero input gives
// zero outputs, unlike ACFG I.
//
// Purely combinational.
module acfg2
  import approx_mul_pkg::*;
#(
  parameter int unsigned N = 1
) (
  input  logic [4:1] x,      // x[1] .. x[4] are the compressor inputs x1 .. x4
  output logic       sum,
  output logic       carry
);

  localparam acfg2_sel_t SEL = ACFG2_SEL[N];

  initial assert (N >= 1 && N <= ACFG2_VARIANTS)
    else $fatal(1, "acfg2: N must be 1..12");

  assign sum   = x[SEL.sum_x];
  assign carry = x[SEL.carry_x];

endmodule
