// tb_half_adder_one: exhaustive check of the half adder with a constant-1
// input, s + 2c == a + 1.
`timescale 1ns/1ps
module tb_half_adder_one;
  logic a, s, c;
  int checks = 0, failures = 0;
  half_adder_one dut (.a(a), .s(s), .c(c));
  initial begin
    #1us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 2; v++) begin
      a = v[0]; #1;
      checks++;
      if (int'(s) + 2 * int'(c) != int'(a) + 1) begin
        failures++; $display("a=%b -> s=%b c=%b", a, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
