// tb_approx_mul8_top: end-to-end test of both approximate multipliers at their
// only size (8x8), with the top left at its defaults.
//
// Sweeps all 65536 operand pairs and, for each multiplier:
//   * compares every product with the arithmetic reference in mul_ref_pkg;
//   * accumulates the accuracy metrics error rate (ER), normalised mean error
//     distance (NMED = mean |error| / 255^2) and mean relative error distance
//     (MRED, pairs with an exact product of 0 contribute 0) and checks them
//     against the published figures: ER 99.93 % / 98.86 %, NMED 0.018 / 0.017,
//     MRED 0.509 / 0.151, each to the precision printed;
//   * prints the largest |error| (not checked, see the README).
// It also counts how often each mechanism of the design was exercised and
// fails if one never was: exact, over- and under-estimated products of each
// multiplier; the constant-1 ACFG I sums giving a non-zero product for a zero
// operand; an AC6G compressor seeing 1111 (its only error for more than two
// ones); non-zero bits in the truncated columns; a carry out of the final
// adder into product bit 15.
`timescale 1ns/1ps
module tb_approx_mul8_top;
  import mul_ref_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] p_mul1, p_mul2;
  int checks = 0, failures = 0;

  approx_mul8_top dut (.a(a), .b(b), .p_mul1(p_mul1), .p_mul2(p_mul2));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int unsigned inexact [1:2], max_err [1:2], over [1:2], under [1:2], exact_n [1:2];
    int unsigned cout [1:2];
    real sum_err [1:2], sum_rel [1:2];
    int unsigned zero_nonzero, ac6g_full, trunc_bits;
    real er, nmed, mred;
    real paper_er [1:2], paper_nmed [1:2], paper_mred [1:2];
    paper_er   = '{99.93, 98.86};
    paper_nmed = '{0.018, 0.017};
    paper_mred = '{0.509, 0.151};
    for (int w = 1; w <= 2; w++) begin
      inexact[w] = 0; max_err[w] = 0; over[w] = 0; under[w] = 0; exact_n[w] = 0;
      cout[w] = 0; sum_err[w] = 0.0; sum_rel[w] = 0.0;
    end
    zero_nonzero = 0; ac6g_full = 0; trunc_bits = 0;

    for (int v = 0; v < 65536; v++) begin
      int unsigned exact;
      {a, b} = v[15:0];
      #1;
      exact = int'(a) * int'(b);
      begin : trunc_count
        bit any;
        any = 1'b0;
        for (int r = 0; r < 4; r++)
          for (int j = 0; j + r < 4; j++) any |= b[r] & a[j];
        if (any) trunc_bits++;
      end
      // column 11's stage-1 AC6G sees b3a7, b4a6, b5a5, b6a4
      if (b[3] & a[7] & b[4] & a[6] & b[5] & a[5] & b[6] & a[4]) ac6g_full++;
      if ((a == 0 || b == 0) && p_mul1 != 0) zero_nonzero++;
      for (int w = 1; w <= 2; w++) begin
        int unsigned pw, err;
        pw = (w == 1) ? 32'(p_mul1) : 32'(p_mul2);
        check(pw == approx_mul(w, a, b),
              $sformatf("mul%0d a=%0d b=%0d p=%0d ref=%0d", w, a, b, pw, approx_mul(w, a, b)));
        err = (pw > exact) ? pw - exact : exact - pw;
        if (err != 0) inexact[w]++; else exact_n[w]++;
        if (pw > exact) over[w]++;
        if (pw < exact) under[w]++;
        if (err > max_err[w]) max_err[w] = err;
        if (pw[15]) cout[w]++;
        sum_err[w] += real'(err);
        if (exact != 0) sum_rel[w] += real'(err) / real'(exact);
      end
    end

    for (int w = 1; w <= 2; w++) begin
      er   = 100.0 * real'(inexact[w]) / 65536.0;
      nmed = sum_err[w] / 65536.0 / 65025.0;
      mred = sum_rel[w] / 65536.0;
      $display("proposed_mul%0d: ER=%0.2f%% NMED=%0.4f MRED=%0.4f max|ED|=%0d",
               w, er, nmed, mred, max_err[w]);
      $display("  exact=%0d over=%0d under=%0d carry-out=%0d", exact_n[w], over[w], under[w], cout[w]);
      check(er >= paper_er[w] - 0.005 && er < paper_er[w] + 0.005, $sformatf("mul%0d ER %f", w, er));
      check(nmed >= paper_nmed[w] && nmed < paper_nmed[w] + 0.001, $sformatf("mul%0d NMED %f", w, nmed));
      check(mred >= paper_mred[w] - 0.0005 && mred < paper_mred[w] + 0.0005, $sformatf("mul%0d MRED %f", w, mred));
      check(exact_n[w] > 0, $sformatf("mul%0d never exact", w));
      check(over[w] > 0,    $sformatf("mul%0d never over-estimates", w));
      check(under[w] > 0,   $sformatf("mul%0d never under-estimates", w));
      check(cout[w] > 0,    $sformatf("mul%0d never sets product bit 15", w));
    end
    $display("zero operand, non-zero mul1 product: %0d; AC6G fed 1111: %0d; truncated bits set: %0d",
             zero_nonzero, ac6g_full, trunc_bits);
    check(zero_nonzero > 0, "constant-1 sums never seen");
    check(ac6g_full > 0, "AC6G never fed 1111");
    check(trunc_bits > 0, "truncated columns never non-zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
