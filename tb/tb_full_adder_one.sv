// tb_full_adder_one: exhaustive check of the full adder with a constant-1
// input, s + 2c == a + b + 1.
`timescale 1ns/1ps
module tb_full_adder_one;
  logic a, b, s, c;
  int checks = 0, failures = 0;
  full_adder_one dut (.a(a), .b(b), .s(s), .c(c));
  initial begin
    #1us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0]; #1;
      checks++;
      if (int'(s) + 2 * int'(c) != int'(a) + int'(b) + 1) begin
        failures++; $display("a=%b b=%b -> s=%b c=%b", a, b, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
