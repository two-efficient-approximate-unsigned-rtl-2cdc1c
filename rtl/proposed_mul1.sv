// proposed_mul1: 8x8 approximate unsigned multiplier built from ACFG I and
// AC6G compressors (the first of the two multipliers of this design).
//
// The 64 partial products form a dot diagram of 15 columns (column c has
// weight 2^(c-1)). The array is split in three parts:
//   * columns 1-4  : truncated; product bits 3..0 are always 0;
//   * columns 5-10 : ACFG I compressors (sum = 1, carry = one input);
//   * columns 11-15: AC6G compressors and exact half adders.
// Two reduction stages bring every column to at most two bits, and a ripple
// adder forms the product. Because each ACFG I sum is a constant 1, the final
// adder of columns 7-10 uses cells with one input tied to 1 (half_adder_one,
// full_adder_one); columns 11-15 use exact full adders.
//
// Compressor placement (row R = bit R-1 of b; inputs listed as x1..x4):
//   stage 1  col 5      ACFG I-4   rows 1-4
//            col 6      ACFG I-4   rows 1-4      (rows 5, 6 go to stage 2)
//            col 7      ACFG I-4   rows 1-4 and rows 5-7
//            col 8      ACFG I-4   rows 1-4 and rows 5-8
//            col 9      ACFG I-4   rows 2-5 and rows 6-8
//            col 10     ACFG I-2   rows 3-6 and rows 7-8
//            col 11     AC6G-12    rows 4-7      (row 8 goes to stage 2)
//            col 12     AC6G-14    rows 5-8
//   stage 2  col 5      ACFG I-4   {row 5, S}
//            col 6      ACFG I-4   {row 5, row 6, S, C from col 5}
//            col 7..9   ACFG I-4   {S1, S2, C1, C2}  (C = carries of col-1)
//            col 10     ACFG I-3   {S1, S2, C1, C2}
//            col 11     AC6G-7     {row 8, S, C1, C2}
//            col 12     half adder {S, C}
//            col 13     AC6G-7     {rows 6-8, C from col 12}
//            col 14     half adder {rows 7, 8}
// Placement, variant numbers and the adder cells are read from the design's
// published dot diagram; where a compressor has fewer than four inputs the
// missing ones are the last positions and are tied to 0 (this design's
// reading of the diagram). Partial products that the chosen variants ignore
// are still wired in, so the code follows the diagram; synthesis removes them.
//
// Interface: a, b unsigned 8-bit operands; p approximate 16-bit product.
// Purely combinational.
module proposed_mul1
  import approx_mul_pkg::*;
(
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  logic [15:1] pc [1:8];

  pp_array8 u_pp (.a(a), .b(b), .pc(pc));

  // ---------------- stage 1 ----------------
  logic s1_5,  c1_5,  s1_6,  c1_6;
  logic s1_7a, c1_7a, s1_7b, c1_7b;
  logic s1_8a, c1_8a, s1_8b, c1_8b;
  logic s1_9a, c1_9a, s1_9b, c1_9b;
  logic s1_10a, c1_10a, s1_10b, c1_10b;
  logic s1_11, c1_11, s1_12, c1_12;

  acfg1 #(.N(4)) u1_5   (.x(xin(pc[1][5],  pc[2][5],  pc[3][5],  pc[4][5])),  .sum(s1_5),   .carry(c1_5));
  acfg1 #(.N(4)) u1_6   (.x(xin(pc[1][6],  pc[2][6],  pc[3][6],  pc[4][6])),  .sum(s1_6),   .carry(c1_6));
  acfg1 #(.N(4)) u1_7a  (.x(xin(pc[1][7],  pc[2][7],  pc[3][7],  pc[4][7])),  .sum(s1_7a),  .carry(c1_7a));
  acfg1 #(.N(4)) u1_7b  (.x(xin(pc[5][7],  pc[6][7],  pc[7][7],  1'b0)),      .sum(s1_7b),  .carry(c1_7b));
  acfg1 #(.N(4)) u1_8a  (.x(xin(pc[1][8],  pc[2][8],  pc[3][8],  pc[4][8])),  .sum(s1_8a),  .carry(c1_8a));
  acfg1 #(.N(4)) u1_8b  (.x(xin(pc[5][8],  pc[6][8],  pc[7][8],  pc[8][8])),  .sum(s1_8b),  .carry(c1_8b));
  acfg1 #(.N(4)) u1_9a  (.x(xin(pc[2][9],  pc[3][9],  pc[4][9],  pc[5][9])),  .sum(s1_9a),  .carry(c1_9a));
  acfg1 #(.N(4)) u1_9b  (.x(xin(pc[6][9],  pc[7][9],  pc[8][9],  1'b0)),      .sum(s1_9b),  .carry(c1_9b));
  acfg1 #(.N(2)) u1_10a (.x(xin(pc[3][10], pc[4][10], pc[5][10], pc[6][10])), .sum(s1_10a), .carry(c1_10a));
  acfg1 #(.N(2)) u1_10b (.x(xin(pc[7][10], pc[8][10], 1'b0,      1'b0)),      .sum(s1_10b), .carry(c1_10b));
  ac6g  #(.N(12)) u1_11 (.x(xin(pc[4][11], pc[5][11], pc[6][11], pc[7][11])), .sum(s1_11),  .carry(c1_11));
  ac6g  #(.N(14)) u1_12 (.x(xin(pc[5][12], pc[6][12], pc[7][12], pc[8][12])), .sum(s1_12),  .carry(c1_12));

  // ---------------- stage 2 ----------------
  logic s2_5, c2_5, s2_6, c2_6, s2_7, c2_7, s2_8, c2_8;
  logic s2_9, c2_9, s2_10, c2_10, s2_11, c2_11;
  logic s2_12, c2_12, s2_13, c2_13, s2_14, c2_14;

  acfg1 #(.N(4)) u2_5   (.x(xin(pc[5][5], s1_5,   1'b0,   1'b0)),   .sum(s2_5),  .carry(c2_5));
  acfg1 #(.N(4)) u2_6   (.x(xin(pc[5][6], pc[6][6], s1_6, c1_5)),   .sum(s2_6),  .carry(c2_6));
  acfg1 #(.N(4)) u2_7   (.x(xin(s1_7a,  s1_7b,  c1_6,   1'b0)),     .sum(s2_7),  .carry(c2_7));
  acfg1 #(.N(4)) u2_8   (.x(xin(s1_8a,  s1_8b,  c1_7a,  c1_7b)),    .sum(s2_8),  .carry(c2_8));
  acfg1 #(.N(4)) u2_9   (.x(xin(s1_9a,  s1_9b,  c1_8a,  c1_8b)),    .sum(s2_9),  .carry(c2_9));
  acfg1 #(.N(3)) u2_10  (.x(xin(s1_10a, s1_10b, c1_9a,  c1_9b)),    .sum(s2_10), .carry(c2_10));
  ac6g  #(.N(7)) u2_11  (.x(xin(pc[8][11], s1_11, c1_10a, c1_10b)), .sum(s2_11), .carry(c2_11));
  half_adder     u2_12  (.a(s1_12), .b(c1_11), .s(s2_12), .c(c2_12));
  ac6g  #(.N(7)) u2_13  (.x(xin(pc[6][13], pc[7][13], pc[8][13], c1_12)), .sum(s2_13), .carry(c2_13));
  half_adder     u2_14  (.a(pc[7][14]), .b(pc[8][14]), .s(s2_14), .c(c2_14));

  // ---------------- final addition ----------------
  // Column contents: 5 {s2_5}, 6 {s2_6}, 7 {s2_7, c2_6}, 8 {s2_8, c2_7},
  // 9 {s2_9, c2_8}, 10 {s2_10, c2_9}, 11 {s2_11, c2_10}, 12 {s2_12, c2_11},
  // 13 {s2_13, c2_12}, 14 {s2_14, c2_13}, 15 {pc[8][15], c2_14}.
  // s2_5 .. s2_10 are ACFG I sums (constant 1), hence the "_one" cells.
  logic [16:8] cy;   // cy[c] = carry into column c

  assign p[3:0] = 4'b0000;           // truncated columns 1-4
  assign p[4]   = s2_5;
  assign p[5]   = s2_6;
  half_adder_one u3_7  (.a(c2_6),                .s(p[6]),  .c(cy[8]));
  full_adder_one u3_8  (.a(c2_7),  .b(cy[8]),    .s(p[7]),  .c(cy[9]));
  full_adder_one u3_9  (.a(c2_8),  .b(cy[9]),    .s(p[8]),  .c(cy[10]));
  full_adder_one u3_10 (.a(c2_9),  .b(cy[10]),   .s(p[9]),  .c(cy[11]));
  full_adder     u3_11 (.a(s2_11), .b(c2_10),     .ci(cy[11]), .s(p[10]), .co(cy[12]));
  full_adder     u3_12 (.a(s2_12), .b(c2_11),     .ci(cy[12]), .s(p[11]), .co(cy[13]));
  full_adder     u3_13 (.a(s2_13), .b(c2_12),     .ci(cy[13]), .s(p[12]), .co(cy[14]));
  full_adder     u3_14 (.a(s2_14), .b(c2_13),     .ci(cy[14]), .s(p[13]), .co(cy[15]));
  full_adder     u3_15 (.a(pc[8][15]), .b(c2_14), .ci(cy[15]), .s(p[14]), .co(cy[16]));
  assign p[15] = cy[16];

  // The constant-1 adder cells are only valid because these sums are 1, and
  // column 6 of the final row has no carry because the two-input ACFG I-4 of
  // stage-2 column 5 has no x4 and so never carries.
  always_comb begin
    assert (s2_7 & s2_8 & s2_9 & s2_10)
      else $error("proposed_mul1: ACFG I sum is not 1");
    assert (!c2_5)
      else $error("proposed_mul1: unexpected carry out of stage-2 column 5");
  end

endmodule
