// ac6g: six-gate approximate 4:2 compressor, variant AC6G-N (N = 1..16).
//
// Maps four equally weighted bits x1..x4 to a sum (weight 1) and a carry
// (weight 2). There is no carry-in or carry-out. The sum is the OR of all four
// inputs, built as two 2-input ORs and a final OR; the carry is
// (xA & (xB | xC)) | (xD & xE). In every variant the (xB | xC) term is one of
// the two first-level ORs of the sum, so the cell needs six gates in all:
// three ORs for the sum, then two ANDs and one OR for the carry.
//
// The variants are input permutations of one another. Their equations follow
// the published table of the sixteen AC6G compressors (see approx_mul_pkg);
// the default N = 12 is the variant the design is introduced with. The
// approximation gives equal numbers of +1 and -1 errors over the six inputs
// with two ones, and reads 1111 as 3.
//
// Purely combinational; critical path is OR -> AND -> OR.
module ac6g
  import approx_mul_pkg::*;
#(
  parameter int unsigned N = 12
) (
  input  logic [4:1] x,      // x[1] .. x[4] are the compressor inputs x1 .. x4
  output logic       sum,
  output logic       carry
);

  localparam ac6g_sel_t SEL = AC6G_SEL[N];

  logic or_lo, or_hi;

  initial assert (N >= 1 && N <= AC6G_VARIANTS)
    else $fatal(1, "ac6g: N must be 1..16");

  assign or_lo = x[SEL.s0] | x[SEL.s1];
  assign or_hi = x[SEL.s2] | x[SEL.s3];
  assign sum   = or_lo | or_hi;
  assign carry = (x[SEL.a] & (x[SEL.b] | x[SEL.c])) | (x[SEL.d] & x[SEL.e]);

endmodule
