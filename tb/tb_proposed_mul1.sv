// tb_proposed_mul1: exhaustive self-checking test of proposed_mul1.
//
// All 65536 operand pairs are applied. Each product is compared with the
// arithmetic reference model in mul_ref_pkg, the low four product bits must
// be 0 (truncated columns), and at the end the sweep figures (inexact count,
// sum and maximum of |error|, sum of products, over- and under-estimates)
// must equal those of an independent software model. A few hand-picked
// products are checked against fixed values as well.
`timescale 1ns/1ps
module tb_proposed_mul1;
  import mul_ref_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  proposed_mul1 dut (.a(a), .b(b), .p(p));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sweep_t got, want;
    got = '{0, 0, 0, 0, 0, 0};
    want = SWEEP_MUL1;
    for (int v = 0; v < 65536; v++) begin
      int unsigned exact, err;
      {a, b} = v[15:0];
      #1;
      exact = int'(a) * int'(b);
      check(32'(p) == approx_mul(1, a, b),
            $sformatf("a=%0d b=%0d p=%0d ref=%0d", a, b, p, approx_mul(1, a, b)));
      check(p[3:0] == 4'h0, $sformatf("a=%0d b=%0d low bits %h", a, b, p[3:0]));
      err = (32'(p) > exact) ? 32'(p) - exact : exact - 32'(p);
      if (err != 0) got.inexact++;
      if (32'(p) > exact) got.over++;
      if (32'(p) < exact) got.under++;
      got.sum_abs_err += err;
      got.sum_product += p;
      if (err > got.max_abs_err) got.max_abs_err = err;
    end
    check(got.inexact == want.inexact, $sformatf("inexact %0d", got.inexact));
    check(got.sum_abs_err == want.sum_abs_err, $sformatf("sum |err| %0d", got.sum_abs_err));
    check(got.max_abs_err == want.max_abs_err, $sformatf("max |err| %0d", got.max_abs_err));
    check(got.sum_product == want.sum_product, $sformatf("sum p %0d", got.sum_product));
    check(got.over == want.over, $sformatf("over %0d", got.over));
    check(got.under == want.under, $sformatf("under %0d", got.under));
    $display("ER=%0.2f%% NMED=%0.4f max|ED|=%0d", 100.0 * got.inexact / 65536.0,
              real'(got.sum_abs_err) / 65536.0 / 65025.0, got.max_abs_err);
    // fixed spot values
    a = 8'd0; b = 8'd0; #1; check(p == 16'd1008, $sformatf("0x0 gave %0d", p));
    a = 8'd255; b = 8'd255; #1; check(p == 16'd54832, $sformatf("255x255 gave %0d", p));
    a = 8'd200; b = 8'd100; #1; check(p == 16'd23536, $sformatf("200x100 gave %0d", p));
    a = 8'd17; b = 8'd93; #1; check(p == 16'd3056, $sformatf("17x93 gave %0d", p));
    a = 8'd128; b = 8'd128; #1; check(p == 16'd17392, $sformatf("128x128 gave %0d", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
