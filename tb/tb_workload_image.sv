// tb_workload_image: the two image-processing uses of the multipliers on a
// generated 64x64 greyscale image, each compared with the same computation
// on exact products by its peak signal-to-noise ratio (PSNR).
//   Image multiplication with the low-accuracy multiplier (prod_low): two
//   images multiplied pixel by pixel, out = x*y / 128.
//   Sobel edge detection with the moderate-accuracy multiplier
//   (prod_moderate): |Gx| + |Gy| with the 3x3 Sobel kernels, every
//   coefficient product going through the multiplier, clipped to 0..255.
//   The kernel coefficients are given 5 fraction bits (x32, so -64..64) to
//   use the multiplier's 8-bit range; the sums are scaled back by 1/32.
// Pixels are 7-bit (0..127) so that they are non-negative values of the
// signed 8-bit operands. The images are smooth gradients with a disc and
// noise, from a fixed-seed generator. Checks: PSNR above 35 dB for the
// multiplication and above 30 dB for the edge map.
module tb_workload_image;
  localparam int S = 64;

  logic [7:0]  a, b;
  logic [15:0] p_high, p_good, p_mod, p_low;
  logic        clk = 1'b0;
  int checks = 0, failures = 0, cycles = 0;

  ml_booth_mult_top dut (
    .a(a), .b(b), .prod_high(p_high), .prod_good(p_good),
    .prod_moderate(p_mod), .prod_low(p_low)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 200000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  int unsigned lcg_state = 32'hcafe_f00d;
  function automatic int noise(int amp);
    lcg_state = lcg_state * 32'd1664525 + 32'd1013904223;
    return int'(lcg_state[31:24]) % (2 * amp + 1) - amp;
  endfunction

  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  function automatic real psnr(real sse, int n, real peak);
    if (sse == 0.0) return 999.0;
    return 10.0 * $log10(peak * peak / (sse / real'(n)));
  endfunction

  int img1 [S][S];
  int img2 [S][S];

  int res_low, res_mod;   // products of the last mul() call

  task automatic mul(input int op_a, input int op_b);
    a = 8'(op_a);
    b = 8'(op_b);
    @(posedge clk);
    res_low = int'($signed(p_low));
    res_mod = int'($signed(p_mod));
  endtask

  real sse_imul;   // image multiplication: squared error sum and pixel count
  int  n_imul;
  real sse_sob;    // Sobel: squared error sum and pixel count
  int  n_sob;
  real ps_imul, ps_sob;

  initial begin
    localparam int CSCALE = 32;   // kernel coefficients in fixed point, 5 fraction bits
    localparam int KX [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    localparam int KY [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};

    for (int y = 0; y < S; y++)
      for (int x = 0; x < S; x++) begin
        int d2;
        d2 = (x - 32) * (x - 32) + (y - 28) * (y - 28);
        img1[y][x] = clip(x * 2 + ((d2 < 300) ? 40 : 0) + noise(4), 0, 127);
        img2[y][x] = clip(127 - y * 2 + noise(6), 0, 127);
      end

    // image multiplication, out = x*y / 128
    sse_imul = 0.0;
    n_imul = 0;
    for (int k = 0; k < S * S; k++) begin
      int oa, oe, px, py;
      py = k / S;
      px = k % S;
      mul(img1[py][px], img2[py][px]);
      oa = clip(res_low / 128, 0, 127);
      oe = clip(img1[py][px] * img2[py][px] / 128, 0, 127);
      sse_imul += real'((oa - oe) * (oa - oe));
      n_imul++;
    end
    ps_imul = psnr(sse_imul, n_imul, 127.0);

    // Sobel edge detection
    sse_sob = 0.0;
    n_sob = 0;
    for (int y = 1; y < S - 1; y++)
      for (int x = 1; x < S - 1; x++) begin
        int gxa, gya, gxe, gye, ea, ee;
        gxa = 0; gya = 0; gxe = 0; gye = 0;
        for (int dy = 0; dy < 3; dy++)
          for (int dx = 0; dx < 3; dx++) begin
            int pix;
            pix = img1[y+dy-1][x+dx-1];
            if (KX[dy][dx] != 0) begin
              mul(pix, KX[dy][dx] * CSCALE);
              gxa += res_mod;
              gxe += pix * KX[dy][dx] * CSCALE;
            end
            if (KY[dy][dx] != 0) begin
              mul(pix, KY[dy][dx] * CSCALE);
              gya += res_mod;
              gye += pix * KY[dy][dx] * CSCALE;
            end
          end
        gxa = gxa / CSCALE; gya = gya / CSCALE; gxe = gxe / CSCALE; gye = gye / CSCALE;
        ea = clip(((gxa < 0) ? -gxa : gxa) + ((gya < 0) ? -gya : gya), 0, 255);
        ee = clip(((gxe < 0) ? -gxe : gxe) + ((gye < 0) ? -gye : gye), 0, 255);
        sse_sob += real'((ea - ee) * (ea - ee));
        n_sob++;
      end

    ps_sob = psnr(sse_sob, n_sob, 255.0);
    $display("image multiplication, low-accuracy multiplier: PSNR %0.2f dB", ps_imul);
    $display("Sobel edge detection, moderate-accuracy multiplier: PSNR %0.2f dB", ps_sob);
    checks += 2;
    if (ps_imul < 35.0) failures++;
    if (ps_sob < 30.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
