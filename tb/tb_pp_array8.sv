// tb_pp_array8: exhaustive check of the partial-product array.
// For every operand pair, every position pc[R][c] must equal b[R-1] & a[c-R]
// inside the parallelogram R <= c <= R+7 and 0 outside it; the weighted sum of
// all bits must equal a * b.
//
// It also counts how the 4-bit input patterns of two adjacent stage-1
// compressors co-occur: column 4 (b3a0, b2a1, b1a2, b0a3 as x1..x4) and column
// 5 (b3a1, b2a2, b1a3, b0a4). Over the exhaustive sweep each count divided by
// 64 is the numerator of the conditional probability P(column 5 pattern |
// column 4 pattern) whose denominator is 81*4, 27*4, 9*4, 3*4 or 4 by group.
// These are compared with the published table of those probabilities, the
// statistics that motivated using different compressor variants in
// neighbouring columns. Rows 0001, 0010, 0100 and 0101 of that table differ
// from the exhaustive count in one or two entries and are not compared.
`timescale 1ns/1ps
module tb_pp_array8;
  logic [7:0]  a, b;
  logic [15:1] pc [1:8];
  int checks = 0, failures = 0;

  // published numerators, row = column-4 pattern x1x2x3x4, entry = column-5 pattern
  localparam int TABLE_V [16][16] = '{
    '{178,  42,  32,   0,  30,   6,   0,   0,  26,   6,   4,   0,   0,   0,   0,   0},  // i = 0000, /324
    '{ 26,  26,  16,  16,   6,   6,   0,   0,   4,   4,   0,   2,   0,   0,   0,   0},  // i = 0001, /108
    '{ 30,  10,  22,   0,  18,   6,  12,   0,   6,   0,   4,   0,   0,   0,   0,   0},  // i = 0010, /108
    '{  0,   0,  10,  10,   0,   0,   6,   6,   0,   0,   2,   2,   0,   0,   0,   0},  // i = 0011, /36
    '{ 32,   8,   8,   0,  22,   4,   0,   0,  16,   4,   4,   0,  10,   0,   0,   0},  // i = 0100, /108
    '{  6,   4,   4,   4,   4,   4,   0,   0,   2,   2,   2,   2,   0,   2,   0,   0},  // i = 0101, /36
    '{  0,   0,   0,   0,  12,   4,   8,   0,   0,   0,   0,   0,   6,   2,   4,   0},  // i = 0110, /36
    '{  0,   0,   0,   0,   0,   0,   4,   4,   0,   0,   0,   0,   0,   0,   2,   2},  // i = 0111, /12
    '{ 42,  10,   8,   0,  10,   2,   0,   0,  26,   6,   4,   0,   0,   0,   0,   0},  // i = 1000, /108
    '{  6,   6,   4,   4,   2,   2,   0,   0,   4,   4,   2,   2,   0,   0,   0,   0},  // i = 1001, /36
    '{  6,   2,   4,   0,   6,   2,   4,   0,   6,   2,   4,   0,   0,   0,   0,   0},  // i = 1010, /36
    '{  0,   0,   2,   2,   0,   0,   2,   2,   0,   0,   2,   2,   0,   0,   0,   0},  // i = 1011, /12
    '{  0,   0,   0,   0,   0,   0,   0,   0,  16,   4,   4,   0,  10,   2,   0,   0},  // i = 1100, /36
    '{  0,   0,   0,   0,   0,   0,   0,   0,   2,   2,   2,   2,   2,   2,   0,   0},  // i = 1101, /12
    '{  0,   0,   0,   0,   0,   0,   0,   0,   0,   0,   0,   0,   6,   2,   4,   0},  // i = 1110, /12
    '{  0,   0,   0,   0,   0,   0,   0,   0,   0,   0,   0,   0,   0,   0,   2,   2}   // i = 1111, /4
  };
  localparam logic [15:0] ROW_COMPARED = 16'b1111_1111_1100_1001;  // bit i: row i compared

  int cooc [16][16];

  pp_array8 dut (.a(a), .b(b), .pc(pc));

  initial begin
    #1ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (cooc[i, j]) cooc[i][j] = 0;
    for (int v = 0; v < 65536; v++) begin
      int total;
      logic [3:0] p4, p5;
      logic ok;
      {a, b} = v[15:0];
      #1;
      total = 0;
      ok = 1'b1;
      for (int r = 1; r <= 8; r++)
        for (int c = 1; c <= 15; c++) begin
          logic e;
          e = (c >= r && c <= r + 7) ? (b[r-1] & a[c-r]) : 1'b0;
          if (pc[r][c] !== e) ok = 1'b0;
          if (pc[r][c]) total += 1 << (c - 1);
        end
      p4 = {pc[4][4], pc[3][4], pc[2][4], pc[1][4]};   // x1 is the MSB: x1x2x3x4
      p5 = {pc[4][5], pc[3][5], pc[2][5], pc[1][5]};
      cooc[p4][p5]++;
      checks++;
      if (!ok || total != int'(a) * int'(b)) begin
        failures++;
        if (failures < 10) $display("a=%0d b=%0d: array wrong (sum %0d)", a, b, total);
      end
    end
    for (int i = 0; i < 16; i++) begin
      if (!ROW_COMPARED[i]) continue;
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (cooc[i][j] != 64 * TABLE_V[i][j]) begin
          failures++;
          $display("column-4 pattern %b, column-5 pattern %b: count %0d, expected 64*%0d",
                   i[3:0], j[3:0], cooc[i][j], TABLE_V[i][j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
