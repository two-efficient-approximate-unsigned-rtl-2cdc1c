// pp_array8: partial-product generator of an 8x8 unsigned multiplier.
//
// Produces the AND array b[r] & a[j] and places each bit at the row and
// column where the dot diagram of the multipliers draws it: row R = r + 1
// (1..8, one row per bit of b) and column c = r + j + 1 (1..15, column 1 is
// the least significant, weight 2^(c-1)). Positions outside the
// parallelogram R <= c <= R + 7 are 0. The multipliers index this array
// directly as pc[R][c], so their wiring can be read against the dot diagram.
// Bits that a multiplier leaves unused are removed by synthesis.
//
// Purely combinational: one AND gate per partial product.
module pp_array8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:1] pc [1:8]   // pc[R][c]
);

  always_comb begin
    for (int r = 1; r <= 8; r++) begin
      pc[r] = '0;
      for (int j = 0; j < 8; j++) begin
        pc[r][r + j] = b[r - 1] & a[j];
      end
    end
  end

endmodule
