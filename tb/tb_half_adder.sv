// tb_half_adder: exhaustive check of the exact half adder, s + 2c == a + b.
`timescale 1ns/1ps
module tb_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;
  half_adder dut (.a(a), .b(b), .s(s), .c(c));
  initial begin
    #1us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0]; #1;
      checks++;
      if (int'(s) + 2 * int'(c) != int'(a) + int'(b)) begin
        failures++; $display("a=%b b=%b -> s=%b c=%b", a, b, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
