// tb_ac6g: exhaustive self-checking test of all sixteen AC6G variants.
//
// One instance per variant N = 1..16 sees the same 4-bit input; every one of
// the 16 input patterns is applied. Outputs are compared with the sum and
// carry equations written out here per variant. Per variant the test also
// checks the error profile the family is designed for: exact on 0, 1 and 3
// ones, three +1 and three -1 errors over the six patterns with two ones, and
// 1111 read as 3.
`timescale 1ns/1ps
module tb_ac6g;

  logic [4:1] x;
  logic [16:1] s, c;
  int checks = 0, failures = 0;

  for (genvar n = 1; n <= 16; n++) begin : g_dut
    ac6g #(.N(n)) dut (.x(x), .sum(s[n]), .carry(c[n]));
  end

  function automatic logic [1:0] ref_sc(int n, logic [4:1] v);
    logic x1, x2, x3, x4, rs, rc;
    {x4, x3, x2, x1} = v;
    case (n)
      1, 2, 3, 4, 5, 6, 7, 8: rs = (x1 | x2) | (x3 | x4);
      9, 10, 11, 12:          rs = (x1 | x3) | (x2 | x4);
      default:                rs = (x1 | x4) | (x2 | x3);
    endcase
    case (n)
      1:  rc = (x1 & (x3 | x4)) | (x2 & x3);
      2:  rc = (x1 & (x3 | x4)) | (x2 & x4);
      3:  rc = (x1 & (x3 | x4)) | (x3 & x4);
      4:  rc = (x2 & (x3 | x4)) | (x1 & x3);
      5:  rc = (x2 & (x3 | x4)) | (x1 & x4);
      6:  rc = (x2 & (x3 | x4)) | (x3 & x4);
      7:  rc = (x3 & (x1 | x2)) | (x1 & x2);
      8:  rc = (x4 & (x1 | x2)) | (x1 & x2);
      9:  rc = (x1 & (x2 | x4)) | (x2 & x3);
      10: rc = (x1 & (x2 | x4)) | (x3 & x4);
      11: rc = (x3 & (x2 | x4)) | (x1 & x2);
      12: rc = (x3 & (x2 | x4)) | (x1 & x4);
      13: rc = (x1 & (x2 | x3)) | (x2 & x4);
      14: rc = (x1 & (x2 | x3)) | (x3 & x4);
      15: rc = (x4 & (x2 | x3)) | (x1 & x2);
      default: rc = (x4 & (x2 | x3)) | (x1 & x3);
    endcase
    return {rc, rs};
  endfunction

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int plus [16:1], minus [16:1], other [16:1];
    for (int n = 1; n <= 16; n++) begin plus[n] = 0; minus[n] = 0; other[n] = 0; end
    for (int v = 0; v < 16; v++) begin
      x = v[3:0];
      #1;
      for (int n = 1; n <= 16; n++) begin
        logic [1:0] exp_sc;
        int value, ones;
        exp_sc = ref_sc(n, x);
        checks++;
        if ({c[n], s[n]} !== exp_sc) begin
          failures++;
          $display("AC6G-%0d x=%b: got c=%b s=%b, expected %b", n, x, c[n], s[n], exp_sc);
        end
        value = int'(s[n]) + 2 * int'(c[n]);
        ones  = $countones(x);
        if (ones == 2 && value == 3) plus[n]++;
        else if (ones == 2 && value == 1) minus[n]++;
        else if (!(ones == 4 && value == 3) && value != ones) other[n]++;
      end
    end
    for (int n = 1; n <= 16; n++) begin
      checks++;
      if (plus[n] != 3 || minus[n] != 3 || other[n] != 0) begin
        failures++;
        $display("AC6G-%0d error profile: +1:%0d -1:%0d other:%0d", n, plus[n], minus[n], other[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
