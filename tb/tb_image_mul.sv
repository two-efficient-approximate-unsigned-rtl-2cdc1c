// tb_image_mul: pixel-wise multiplication of two generated 8-bit grey-scale
// images with both approximate multipliers, scored by PSNR against the exact
// products.
//
// The two 128x128 images are smooth patterns (sums of sines) plus a little
// pseudo-random texture, so that pixel values spread over the 0..255 range
// like photographs do. PSNR = 10*log10(N * MAX^2 / sum (exact - approx)^2),
// with MAX the largest possible product, 255 * 255, and N the pixel count.
// The test passes when every product equals the reference model and both
// multipliers reach 30 dB, the level usually taken as acceptable for images.
`timescale 1ns/1ps
module tb_image_mul;
  import mul_ref_pkg::*;

  localparam int W = 128;
  localparam int H = 128;

  logic [7:0]  a, b;
  logic [15:0] p_mul1, p_mul2;
  int checks = 0, failures = 0;

  approx_mul8_top dut (.a(a), .b(b), .p_mul1(p_mul1), .p_mul2(p_mul2));

  function automatic logic [7:0] clip8(real v);
    if (v < 0.0) return 8'd0;
    if (v > 255.0) return 8'd255;
    return 8'(int'(v));
  endfunction

  initial begin
    #1ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real sse1 = 0.0, sse2 = 0.0, psnr1, psnr2, maxv;
    int seed;
    seed = 7;
    for (int i = 0; i < H; i++) begin
      for (int j = 0; j < W; j++) begin
        real e1, e2, t;
        int unsigned exact;
        t = real'($urandom(seed) % 9) - 4.0;
        seed = seed + 1;
        a = clip8(128.0 + 70.0 * $sin(i / 9.0) * $cos(j / 13.0) + 40.0 * $sin((i + j) / 21.0) + t);
        b = clip8(110.0 + 90.0 * $cos(i / 17.0) + 30.0 * $sin(j / 5.0) - t);
        #1;
        exact = int'(a) * int'(b);
        checks++;
        if (32'(p_mul1) != approx_mul(1, a, b) || 32'(p_mul2) != approx_mul(2, a, b)) begin
          failures++;
          $display("pixel (%0d,%0d): products differ from the reference", i, j);
        end
        e1 = real'(exact) - real'(p_mul1);
        e2 = real'(exact) - real'(p_mul2);
        sse1 += e1 * e1;
        sse2 += e2 * e2;
      end
    end
    maxv = 65025.0;
    psnr1 = 10.0 * $log10(real'(W * H) * maxv * maxv / sse1);
    psnr2 = 10.0 * $log10(real'(W * H) * maxv * maxv / sse2);
    $display("image multiplication PSNR: proposed_mul1 %0.2f dB, proposed_mul2 %0.2f dB", psnr1, psnr2);
    checks++;
    if (psnr1 < 30.0) begin failures++; $display("proposed_mul1 below 30 dB"); end
    checks++;
    if (psnr2 < 30.0) begin failures++; $display("proposed_mul2 below 30 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
