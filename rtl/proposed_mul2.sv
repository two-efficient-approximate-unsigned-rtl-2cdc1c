// proposed_mul2: 8x8 approximate unsigned multiplier built from ACFG II and
// AC6G compressors (the second of the two multipliers of this design).
//
// Same three-part split of the 15-column dot diagram as proposed_mul1:
// columns 1-4 truncated (product bits 3..0 are 0), columns 5-10 reduced by
// ACFG II compressors (sum and carry are each one chosen input), columns 11-15
// by AC6G compressors and exact half adders. Two reduction stages leave at
// most two bits per column. Because ACFG II sums are data, not constants, the
// final ripple adder uses ordinary cells: a half adder in column 6 and full
// adders in columns 7-15.
//
// Compressor placement (row R = bit R-1 of b; inputs listed as x1..x4):
//   stage 1  col 5      ACFG II-1  rows 1-4      (row 5 goes to stage 2)
//            col 6      ACFG II-1  rows 1-4      (rows 5, 6 go to stage 2)
//            col 7      ACFG II-1  rows 1-4 and rows 5-7
//            col 8      ACFG II-1  rows 1-4 and rows 5-8
//            col 9      ACFG II-5  rows 2-5 and rows 6-8
//            col 10     ACFG II-11 rows 3-6 and rows 7-8
//            col 11     AC6G-12    rows 4-7      (row 8 goes to stage 2)
//            col 12     AC6G-14    rows 5-8
//   stage 2  col 5      ACFG II-1  {row 5, S}
//            col 6      ACFG II-1  {row 5, row 6, S, C from col 5}
//            col 7      ACFG II-1  {S1, S2, C from col 6}
//            col 8, 9   ACFG II-1  {S1, S2, C1, C2}  (C = carries of col-1)
//            col 10     ACFG II-10 {S1, S2, C1, C2}
//            col 11     AC6G-7     {row 8, S, C1, C2}
//            col 12     half adder {S, C}
//            col 13     AC6G-7     {rows 6-8, C from col 12}
//            col 14     half adder {rows 7, 8}
// Placement, variant numbers and adder cells are read from the design's
// published dot diagram; a compressor with fewer than four inputs has its
// missing inputs in the last positions, tied to 0 (this design's reading).
// Ignored partial products are still wired in; synthesis removes them.
//
// Interface: a, b unsigned 8-bit operands; p approximate 16-bit product.
// Purely combinational.
module proposed_mul2
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

  acfg2 #(.N(1))  u1_5   (.x(xin(pc[1][5],  pc[2][5],  pc[3][5],  pc[4][5])),  .sum(s1_5),   .carry(c1_5));
  acfg2 #(.N(1))  u1_6   (.x(xin(pc[1][6],  pc[2][6],  pc[3][6],  pc[4][6])),  .sum(s1_6),   .carry(c1_6));
  acfg2 #(.N(1))  u1_7a  (.x(xin(pc[1][7],  pc[2][7],  pc[3][7],  pc[4][7])),  .sum(s1_7a),  .carry(c1_7a));
  acfg2 #(.N(1))  u1_7b  (.x(xin(pc[5][7],  pc[6][7],  pc[7][7],  1'b0)),      .sum(s1_7b),  .carry(c1_7b));
  acfg2 #(.N(1))  u1_8a  (.x(xin(pc[1][8],  pc[2][8],  pc[3][8],  pc[4][8])),  .sum(s1_8a),  .carry(c1_8a));
  acfg2 #(.N(1))  u1_8b  (.x(xin(pc[5][8],  pc[6][8],  pc[7][8],  pc[8][8])),  .sum(s1_8b),  .carry(c1_8b));
  acfg2 #(.N(5))  u1_9a  (.x(xin(pc[2][9],  pc[3][9],  pc[4][9],  pc[5][9])),  .sum(s1_9a),  .carry(c1_9a));
  acfg2 #(.N(5))  u1_9b  (.x(xin(pc[6][9],  pc[7][9],  pc[8][9],  1'b0)),      .sum(s1_9b),  .carry(c1_9b));
  acfg2 #(.N(11)) u1_10a (.x(xin(pc[3][10], pc[4][10], pc[5][10], pc[6][10])), .sum(s1_10a), .carry(c1_10a));
  acfg2 #(.N(11)) u1_10b (.x(xin(pc[7][10], pc[8][10], 1'b0,      1'b0)),      .sum(s1_10b), .carry(c1_10b));
  ac6g  #(.N(12)) u1_11  (.x(xin(pc[4][11], pc[5][11], pc[6][11], pc[7][11])), .sum(s1_11),  .carry(c1_11));
  ac6g  #(.N(14)) u1_12  (.x(xin(pc[5][12], pc[6][12], pc[7][12], pc[8][12])), .sum(s1_12),  .carry(c1_12));

  // ---------------- stage 2 ----------------
  logic s2_5, c2_5, s2_6, c2_6, s2_7, c2_7, s2_8, c2_8;
  logic s2_9, c2_9, s2_10, c2_10, s2_11, c2_11;
  logic s2_12, c2_12, s2_13, c2_13, s2_14, c2_14;

  acfg2 #(.N(1))  u2_5   (.x(xin(pc[5][5], s1_5,     1'b0,  1'b0)),   .sum(s2_5),  .carry(c2_5));
  acfg2 #(.N(1))  u2_6   (.x(xin(pc[5][6], pc[6][6], s1_6,  c1_5)),   .sum(s2_6),  .carry(c2_6));
  acfg2 #(.N(1))  u2_7   (.x(xin(s1_7a,  s1_7b,  c1_6,   1'b0)),      .sum(s2_7),  .carry(c2_7));
  acfg2 #(.N(1))  u2_8   (.x(xin(s1_8a,  s1_8b,  c1_7a,  c1_7b)),     .sum(s2_8),  .carry(c2_8));
  acfg2 #(.N(1))  u2_9   (.x(xin(s1_9a,  s1_9b,  c1_8a,  c1_8b)),     .sum(s2_9),  .carry(c2_9));
  acfg2 #(.N(10)) u2_10  (.x(xin(s1_10a, s1_10b, c1_9a,  c1_9b)),     .sum(s2_10), .carry(c2_10));
  ac6g  #(.N(7))  u2_11  (.x(xin(pc[8][11], s1_11, c1_10a, c1_10b)),  .sum(s2_11), .carry(c2_11));
  half_adder      u2_12  (.a(s1_12), .b(c1_11), .s(s2_12), .c(c2_12));
  ac6g  #(.N(7))  u2_13  (.x(xin(pc[6][13], pc[7][13], pc[8][13], c1_12)), .sum(s2_13), .carry(c2_13));
  half_adder      u2_14  (.a(pc[7][14]), .b(pc[8][14]), .s(s2_14), .c(c2_14));

  // ---------------- final addition ----------------
  // Column contents: 5 {s2_5}, 6 {s2_6, c2_5}, 7 {s2_7, c2_6}, 8 {s2_8, c2_7},
  // 9 {s2_9, c2_8}, 10 {s2_10, c2_9}, 11 {s2_11, c2_10}, 12 {s2_12, c2_11},
  // 13 {s2_13, c2_12}, 14 {s2_14, c2_13}, 15 {pc[8][15], c2_14}.
  logic [16:7] cy;   // cy[c] = carry into column c

  assign p[3:0] = 4'b0000;           // truncated columns 1-4
  assign p[4]   = s2_5;
  half_adder  u3_6  (.a(s2_6),  .b(c2_5),                  .s(p[5]),  .c(cy[7]));
  full_adder  u3_7  (.a(s2_7),  .b(c2_6),  .ci(cy[7]),     .s(p[6]),  .co(cy[8]));
  full_adder  u3_8  (.a(s2_8),  .b(c2_7),  .ci(cy[8]),     .s(p[7]),  .co(cy[9]));
  full_adder  u3_9  (.a(s2_9),  .b(c2_8),  .ci(cy[9]),     .s(p[8]),  .co(cy[10]));
  full_adder  u3_10 (.a(s2_10), .b(c2_9),  .ci(cy[10]),    .s(p[9]),  .co(cy[11]));
  full_adder  u3_11 (.a(s2_11), .b(c2_10), .ci(cy[11]),    .s(p[10]), .co(cy[12]));
  full_adder  u3_12 (.a(s2_12), .b(c2_11), .ci(cy[12]),    .s(p[11]), .co(cy[13]));
  full_adder  u3_13 (.a(s2_13), .b(c2_12), .ci(cy[13]),    .s(p[12]), .co(cy[14]));
  full_adder  u3_14 (.a(s2_14), .b(c2_13), .ci(cy[14]),    .s(p[13]), .co(cy[15]));
  full_adder  u3_15 (.a(pc[8][15]), .b(c2_14), .ci(cy[15]), .s(p[14]), .co(cy[16]));
  assign p[15] = cy[16];

endmodule
