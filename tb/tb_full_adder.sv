// tb_full_adder: exhaustive check of the exact full adder, s + 2co == a + b + ci.
`timescale 1ns/1ps
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;
  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  initial begin
    #1us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = v[2:0]; #1;
      checks++;
      if (int'(s) + 2 * int'(co) != int'(a) + int'(b) + int'(ci)) begin
        failures++; $display("a=%b b=%b ci=%b -> s=%b co=%b", a, b, ci, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
