// tb_acfg1: exhaustive self-checking test of the four ACFG I variants.
//
// All 16 input patterns are applied to the variants N = 1..4. Expected
// outputs: sum = 1, carry = xN. The test also checks that the represented
// value 1 + 2*xN has as many +1 as -1 errors over the six patterns with two
// ones, the balance the family keeps for that input group.
`timescale 1ns/1ps
module tb_acfg1;

  logic [4:1] x;
  logic [4:1] s, c;
  int checks = 0, failures = 0;

  for (genvar n = 1; n <= 4; n++) begin : g_dut
    acfg1 #(.N(n)) dut (.x(x), .sum(s[n]), .carry(c[n]));
  end

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bal [4:1];
    for (int n = 1; n <= 4; n++) bal[n] = 0;
    for (int v = 0; v < 16; v++) begin
      x = v[3:0];
      #1;
      for (int n = 1; n <= 4; n++) begin
        checks++;
        if (s[n] !== 1'b1 || c[n] !== v[n-1]) begin
          failures++;
          $display("ACFG I-%0d x=%b: got c=%b s=%b", n, x, c[n], s[n]);
        end
        if ($countones(x) == 2) bal[n] += (int'(s[n]) + 2 * int'(c[n])) - 2;
      end
    end
    for (int n = 1; n <= 4; n++) begin
      checks++;
      if (bal[n] != 0) begin
        failures++;
        $display("ACFG I-%0d: two-ones errors do not cancel (%0d)", n, bal[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
