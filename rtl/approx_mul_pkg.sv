// approx_mul_pkg: shared types and selection tables for the approximate 4:2
// compressors and the two 8x8 approximate unsigned multipliers built on them.
//
// The compressor families (AC6G, ACFG I, ACFG II) have no carry-in and no
// carry-out; each maps four partial-product bits x1..x4 to a sum bit of weight 1
// and a carry bit of weight 2. The variants inside a family differ only in which
// inputs feed which gate, so a variant is selected by a small table indexed by
// its published number:
//   AC6G-n   : sum   = (xS0 | xS1) | (xS2 | xS3)
//              carry = (xA & (xB | xC)) | (xD & xE)
//   ACFG I-n : sum = 1, carry = xn
//   ACFG II-n: sum = xSUM, carry = xCARRY
// Index values are 1..4 so that they read like the x1..x4 of the equations.
// The tables are transcribed from the published equations; nothing here is timing.
package approx_mul_pkg;

  typedef logic [2:0] xidx_t;  // 1..4 selects x1..x4

  // AC6G variant: pairing of the sum OR tree and the five carry terms.
  typedef struct packed {
    xidx_t s0, s1, s2, s3;     // sum   = (x[s0] | x[s1]) | (x[s2] | x[s3])
    xidx_t a, b, c, d, e;      // carry = (x[a] & (x[b] | x[c])) | (x[d] & x[e])
  } ac6g_sel_t;

  // ACFG II variant: which input is the sum, which is the carry.
  typedef struct packed {
    xidx_t sum_x;
    xidx_t carry_x;
  } acfg2_sel_t;

  localparam int unsigned AC6G_VARIANTS  = 16;
  localparam int unsigned ACFG1_VARIANTS = 4;
  localparam int unsigned ACFG2_VARIANTS = 12;

  localparam ac6g_sel_t AC6G_SEL [1:AC6G_VARIANTS] = '{
    '{3'd1, 3'd2, 3'd3, 3'd4,  3'd1, 3'd3, 3'd4, 3'd2, 3'd3},  // AC6G-1
    '{3'd1, 3'd2, 3'd3, 3'd4,  3'd1, 3'd3, 3'd4, 3'd2, 3'd4},  // AC6G-2
    '{3'd1, 3'd2, 3'd3, 3'd4,  3'd1, 3'd3, 3'd4, 3'd3, 3'd4},  // AC6G-3
    '{3'd1, 3'd2, 3'd3, 3'd4,  3'd2, 3'd3, 3'd4, 3'd1, 3'd3},  // AC6G-4
    '{3'd1, 3'd2, 3'd3, 3'd4,  3'd2, 3'd3, 3'd4, 3'd1, 3'd4},  // AC6G-5
    '{3'd1, 3'd2, 3'd3, 3'd4,  3'd2, 3'd3, 3'd4, 3'd3, 3'd4},  // AC6G-6
    '{3'd1, 3'd2, 3'd3, 3'd4,  3'd3, 3'd1, 3'd2, 3'd1, 3'd2},  // AC6G-7
    '{3'd1, 3'd2, 3'd3, 3'd4,  3'd4, 3'd1, 3'd2, 3'd1, 3'd2},  // AC6G-8
    '{3'd1, 3'd3, 3'd2, 3'd4,  3'd1, 3'd2, 3'd4, 3'd2, 3'd3},  // AC6G-9
    '{3'd1, 3'd3, 3'd2, 3'd4,  3'd1, 3'd2, 3'd4, 3'd3, 3'd4},  // AC6G-10
    '{3'd1, 3'd3, 3'd2, 3'd4,  3'd3, 3'd2, 3'd4, 3'd1, 3'd2},  // AC6G-11
    '{3'd1, 3'd3, 3'd2, 3'd4,  3'd3, 3'd2, 3'd4, 3'd1, 3'd4},  // AC6G-12
    '{3'd1, 3'd4, 3'd2, 3'd3,  3'd1, 3'd2, 3'd3, 3'd2, 3'd4},  // AC6G-13
    '{3'd1, 3'd4, 3'd2, 3'd3,  3'd1, 3'd2, 3'd3, 3'd3, 3'd4},  // AC6G-14
    '{3'd1, 3'd4, 3'd2, 3'd3,  3'd4, 3'd2, 3'd3, 3'd1, 3'd2},  // AC6G-15
    '{3'd1, 3'd4, 3'd2, 3'd3,  3'd4, 3'd2, 3'd3, 3'd1, 3'd3}   // AC6G-16
  };

  localparam acfg2_sel_t ACFG2_SEL [1:ACFG2_VARIANTS] = '{
    '{3'd1, 3'd2},  // ACFG II-1
    '{3'd1, 3'd3},  // ACFG II-2
    '{3'd1, 3'd4},  // ACFG II-3
    '{3'd2, 3'd1},  // ACFG II-4
    '{3'd2, 3'd3},  // ACFG II-5
    '{3'd2, 3'd4},  // ACFG II-6
    '{3'd3, 3'd1},  // ACFG II-7
    '{3'd3, 3'd2},  // ACFG II-8
    '{3'd3, 3'd4},  // ACFG II-9
    '{3'd4, 3'd1},  // ACFG II-10
    '{3'd4, 3'd2},  // ACFG II-11
    '{3'd4, 3'd3}   // ACFG II-12
  };

  // Packs four bits into a compressor input vector so that a call reads in the
  // order x1, x2, x3, x4. Unused positions of a compressor with fewer than four
  // inputs are passed as 1'b0.
  function automatic logic [4:1] xin(logic x1, logic x2, logic x3, logic x4);
    return {x4, x3, x2, x1};
  endfunction

endpackage
