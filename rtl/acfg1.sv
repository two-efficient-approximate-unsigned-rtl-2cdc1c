// acfg1: gate-free approximate 4:2 compressor, variant ACFG I-N (N = 1..4).
//
// The sum output is the constant 1 and the carry output is the input xN; the
// other three inputs are not used. No carry-in, no carry-out and no gates:
// the cell is wiring only, which is why a multiplier built on it can drop most
// of the partial products that feed it. Equations follow the published table
// of the four ACFG I compressors. The default N = 4 is the variant used most in
// the first multiplier (proposed_mul1).
//
// Purely combinational.
module acfg1 #(
  parameter int unsigned N = 4
) (
  input  logic [4:1] x,      // x[1] .. x[4] are the compressor inputs x1 .. x4
  output logic       sum,
  output logic       carry
);

  initial assert (N >= 1 && N <= approx_mul_pkg::ACFG1_VARIANTS)
    else $fatal(1, "acfg1: N must be 1..4");

  assign sum   = 1'b1;
  assign carry = x[N];

endmodule
