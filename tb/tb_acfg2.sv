// tb_acfg2: exhaustive self-checking test of the twelve ACFG II variants.
//
// All 16 input patterns are applied to the variants N = 1..12 and compared
// with the published (sum input, carry input) pairs, written out here as a
// table. It also checks that ACFG II-1 gets exactly ten of the sixteen
// patterns wrong and leaves 0000 exact.
`timescale 1ns/1ps
module tb_acfg2;

  logic [4:1] x;
  logic [12:1] s, c;
  int checks = 0, failures = 0;

  // {sum input, carry input} for ACFG II-1 .. ACFG II-12
  localparam int SUM_IN   [1:12] = '{1, 1, 1, 2, 2, 2, 3, 3, 3, 4, 4, 4};
  localparam int CARRY_IN [1:12] = '{2, 3, 4, 1, 3, 4, 1, 2, 4, 1, 2, 3};

  for (genvar n = 1; n <= 12; n++) begin : g_dut
    acfg2 #(.N(n)) dut (.x(x), .sum(s[n]), .carry(c[n]));
  end

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wrong1 = 0;
    for (int v = 0; v < 16; v++) begin
      x = v[3:0];
      #1;
      for (int n = 1; n <= 12; n++) begin
        checks++;
        if (s[n] !== v[SUM_IN[n]-1] || c[n] !== v[CARRY_IN[n]-1]) begin
          failures++;
          $display("ACFG II-%0d x=%b: got c=%b s=%b", n, x, c[n], s[n]);
        end
      end
      if (int'(s[1]) + 2 * int'(c[1]) != $countones(x)) begin
        wrong1++;
        checks++;
        if (v == 0) begin
          failures++;
          $display("ACFG II-1 is wrong on 0000");
        end
      end
    end
    checks++;
    if (wrong1 != 10) begin
      failures++;
      $display("ACFG II-1 approximates %0d patterns, expected 10", wrong1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
