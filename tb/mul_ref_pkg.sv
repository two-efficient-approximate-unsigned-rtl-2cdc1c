// mul_ref_pkg: reference models of the two approximate multipliers for the
// testbenches, written as plain integer arithmetic over the dot diagram
// rather than as a netlist: every compressor is a function returning
// {carry, sum}, and the final two rows are added with '+'.
//
// The package also holds exhaustive-sweep figures (over all 65536 operand
// pairs) of an independent software model of the same structure: number of
// inexact products, sum of |error|, largest |error|, sum of products and the
// counts of over- and under-estimates.
package mul_ref_pkg;

  // partial product at dot-diagram row R (bit R-1 of b), column c
  function automatic bit pp(logic [7:0] a, logic [7:0] b, int r, int c);
    if (c < r || c > r + 7) return 1'b0;
    return b[r-1] & a[c-r];
  endfunction

  function automatic bit [1:0] c_ac6g(int n, bit x1, bit x2, bit x3, bit x4);
    bit s, c;
    s = x1 | x2 | x3 | x4;
    case (n)
      7:  c = (x3 & (x1 | x2)) | (x1 & x2);
      12: c = (x3 & (x2 | x4)) | (x1 & x4);
      14: c = (x1 & (x2 | x3)) | (x3 & x4);
      default: c = 1'b0;   // only the three variants the multipliers use
    endcase
    return {c, s};
  endfunction

  function automatic bit [1:0] c_acfg1(int n, bit x1, bit x2, bit x3, bit x4);
    bit [4:1] v;
    v = {x4, x3, x2, x1};
    return {v[n], 1'b1};
  endfunction

  function automatic bit [1:0] c_acfg2(int n, bit x1, bit x2, bit x3, bit x4);
    bit [4:1] v;
    v = {x4, x3, x2, x1};
    case (n)
      1:  return {v[2], v[1]};
      5:  return {v[3], v[2]};
      10: return {v[1], v[4]};
      11: return {v[2], v[4]};
      default: return 2'b00;   // only the variants the multipliers use
    endcase
  endfunction

  // generic middle-column compressor: family 1 = ACFG I, 2 = ACFG II
  function automatic bit [1:0] mid(int fam, int n, bit x1, bit x2, bit x3, bit x4);
    return (fam == 1) ? c_acfg1(n, x1, x2, x3, x4) : c_acfg2(n, x1, x2, x3, x4);
  endfunction

  function automatic int unsigned approx_mul(int which, logic [7:0] a, logic [7:0] b);
    int fam, v5, v6, v7, v8, v9, v10;  // variant numbers per column
    int unsigned acc;
    bit [1:0] r5, r6, r7a, r7b, r8a, r8b, r9a, r9b, r10a, r10b, r11, r12;
    bit [1:0] t5, t6, t7, t8, t9, t10, t11, t13;
    fam = which;
    if (which == 1) begin v5 = 4; v6 = 4; v7 = 4; v8 = 4; v9 = 4; v10 = 2; end
    else            begin v5 = 1; v6 = 1; v7 = 1; v8 = 1; v9 = 5; v10 = 11; end
    // stage 1
    r5   = mid(fam, v5,  pp(a,b,1,5),  pp(a,b,2,5),  pp(a,b,3,5),  pp(a,b,4,5));
    r6   = mid(fam, v6,  pp(a,b,1,6),  pp(a,b,2,6),  pp(a,b,3,6),  pp(a,b,4,6));
    r7a  = mid(fam, v7,  pp(a,b,1,7),  pp(a,b,2,7),  pp(a,b,3,7),  pp(a,b,4,7));
    r7b  = mid(fam, v7,  pp(a,b,5,7),  pp(a,b,6,7),  pp(a,b,7,7),  1'b0);
    r8a  = mid(fam, v8,  pp(a,b,1,8),  pp(a,b,2,8),  pp(a,b,3,8),  pp(a,b,4,8));
    r8b  = mid(fam, v8,  pp(a,b,5,8),  pp(a,b,6,8),  pp(a,b,7,8),  pp(a,b,8,8));
    r9a  = mid(fam, v9,  pp(a,b,2,9),  pp(a,b,3,9),  pp(a,b,4,9),  pp(a,b,5,9));
    r9b  = mid(fam, v9,  pp(a,b,6,9),  pp(a,b,7,9),  pp(a,b,8,9),  1'b0);
    r10a = mid(fam, v10, pp(a,b,3,10), pp(a,b,4,10), pp(a,b,5,10), pp(a,b,6,10));
    r10b = mid(fam, v10, pp(a,b,7,10), pp(a,b,8,10), 1'b0,         1'b0);
    r11  = c_ac6g(12, pp(a,b,4,11), pp(a,b,5,11), pp(a,b,6,11), pp(a,b,7,11));
    r12  = c_ac6g(14, pp(a,b,5,12), pp(a,b,6,12), pp(a,b,7,12), pp(a,b,8,12));
    // stage 2
    t5  = mid(fam, v5, pp(a,b,5,5), r5[0], 1'b0, 1'b0);
    t6  = mid(fam, v6, pp(a,b,5,6), pp(a,b,6,6), r6[0], r5[1]);
    t7  = mid(fam, v7, r7a[0], r7b[0], r6[1], 1'b0);
    t8  = mid(fam, v8, r8a[0], r8b[0], r7a[1], r7b[1]);
    t9  = mid(fam, (which == 1) ? 4 : 1, r9a[0], r9b[0], r8a[1], r8b[1]);
    t10 = mid(fam, (which == 1) ? 3 : 10, r10a[0], r10b[0], r9a[1], r9b[1]);
    t11 = c_ac6g(7, pp(a,b,8,11), r11[0], r10a[1], r10b[1]);
    t13 = c_ac6g(7, pp(a,b,6,13), pp(a,b,7,13), pp(a,b,8,13), r12[1]);
    // everything left, added at its weight (column c has weight 2^(c-1))
    acc = 0;
    acc += t5[0] << 4;
    if (which == 2) acc += t5[1] << 5;          // ACFG I-4 on {pp, S} never carries
    acc += t6[0] << 5;   acc += t6[1] << 6;
    acc += t7[0] << 6;   acc += t7[1] << 7;
    acc += t8[0] << 7;   acc += t8[1] << 8;
    acc += t9[0] << 8;   acc += t9[1] << 9;
    acc += t10[0] << 9;  acc += t10[1] << 10;
    acc += t11[0] << 10; acc += t11[1] << 11;
    acc += (r12[0] + r11[1]) << 11;             // exact half adder in column 12
    acc += t13[0] << 12; acc += t13[1] << 13;
    acc += (pp(a,b,7,14) + pp(a,b,8,14)) << 13; // exact half adder in column 14
    acc += pp(a,b,8,15) << 14;
    return acc;
  endfunction

  // Exhaustive-sweep figures of an independent software model.
  typedef struct {
    int unsigned inexact;
    longint      sum_abs_err;
    int unsigned max_abs_err;
    longint      sum_product;
    int unsigned over;
    int unsigned under;
  } sweep_t;

  localparam sweep_t SWEEP_MUL1 = '{65491, 78536150, 10450, 1084096512, 41251, 24240};
  localparam sweep_t SWEEP_MUL2 = '{64788, 75789384, 9811, 1041367040, 22506, 42282};

endpackage
