// tb_workload_cnn: the proposal stage of a cascaded face-detection CNN, run
// with every multiplication on the high-accuracy multiplier (prod_high) and,
// in parallel, with exact products.
//
// The network is the usual first stage of such a cascade, for one 12x12 RGB
// window: 3x3 convolution to 10 channels, PReLU, 2x2 max pooling, 3x3
// convolution to 16 channels, PReLU, 3x3 convolution to 32 channels, PReLU,
// and 1x1 heads giving 2 face/non-face scores, 4 box offsets and 10
// landmark coordinates. 45,080 multiplications per window. Weights, biases
// and pixels (0..127) come from a fixed-seed linear congruential generator;
// no trained network is involved. After each layer the sums are shifted
// right and clamped to [-128, 127] so the next layer again has 8-bit signed
// operands; PReLU uses a slope of 1/4 (arithmetic shift by 2).
//
// The approximate and exact networks each keep their own activations, so
// errors propagate as they would in hardware. Checks over NWIN windows: all
// multiplications were made (counted as clock cycles), first-layer sums
// are within 1 % (mean |error| / mean |exact|, measured 0.11 %), head
// outputs within 5 % (measured 1.1 %), and the face/non-face decision is
// equal in at least 90 % of windows (measured 12 of 12). Every
// multiplication takes one clock cycle of the testbench; the multiplier
// itself is combinational. Running sums are turned into ratios
// after every window, so the final checks read plain assigned values.
module tb_workload_cnn;
  localparam int NWIN = 12;
  localparam int IN = 12, C0 = 3, C1 = 10, C2 = 16, C3 = 32, NH = 16;
  localparam int S1 = IN - 2;   // 10: conv1 output size
  localparam int SP = S1 / 2;   // 5: after pooling
  localparam int S2 = SP - 2;   // 3: conv2 output size
  localparam int K1 = C0 * 9, K2 = C1 * 9, K3 = C2 * 9;

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
    if (cycles > 1000000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  int unsigned lcg_state = 32'h0bad_cafe;
  function automatic int rnd8();
    lcg_state = lcg_state * 32'd1664525 + 32'd1013904223;
    return int'($signed(lcg_state[31:24]));
  endfunction

  // requantise a sum to an 8-bit operand, with optional PReLU
  function automatic int requant(int acc, int shift, bit prelu);
    int v;
    v = acc >>> shift;
    if (prelu && v < 0) v = v >>> 2;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  // weights and biases, shared by both networks
  byte w1 [C1][K1];
  byte w2 [C2][K2];
  byte w3 [C3][K3];
  byte wh [NH][C3];
  byte bias1 [C1], bias2 [C2], bias3 [C3], biash [NH];

  // activations: index [0] approximate network, [1] exact network
  int x0 [C0][IN][IN];
  int c1 [2][C1][S1][S1];
  int p1 [2][C1][SP][SP];
  int c2 [2][C2][S2][S2];
  int c3 [2][C3];
  int hd [2][NH];

  int res_approx;   // product of the last mul() call
  real err1, mag1, errh, magh;
  real ratio1, ratioh;   // running error ratios, updated after every window
  int  agree, n_mul, cyc0;   // multiplications are counted as clock cycles

  task automatic mul(input int op_a, input int op_b);
    a = 8'(op_a);
    b = 8'(op_b);
    @(posedge clk);
    res_approx = int'($signed(p_high));
  endtask

  initial begin
    for (int o = 0; o < C1; o++) begin
      for (int k = 0; k < K1; k++) w1[o][k] = byte'(rnd8());
      bias1[o] = byte'(rnd8());
    end
    for (int o = 0; o < C2; o++) begin
      for (int k = 0; k < K2; k++) w2[o][k] = byte'(rnd8());
      bias2[o] = byte'(rnd8());
    end
    for (int o = 0; o < C3; o++) begin
      for (int k = 0; k < K3; k++) w3[o][k] = byte'(rnd8());
      bias3[o] = byte'(rnd8());
    end
    for (int o = 0; o < NH; o++) begin
      for (int k = 0; k < C3; k++) wh[o][k] = byte'(rnd8());
      biash[o] = byte'(rnd8());
    end

    err1 = 0.0; mag1 = 0.0; errh = 0.0; magh = 0.0;
    agree = 0;
    cyc0 = cycles;
    ratio1 = 1.0;
    ratioh = 1.0;
    for (int w = 0; w < NWIN; w++) begin
      for (int c = 0; c < C0; c++)
        for (int y = 0; y < IN; y++)
          for (int x = 0; x < IN; x++) x0[c][y][x] = rnd8() & 32'h7f;

      // conv1: one flattened loop over (channel, row, column, tap)
      for (int n = 0; n < C1 * S1 * S1 * K1; n++) begin
        int o, y, x, k, ci, dy, dx, xa;
        o  = n / (S1 * S1 * K1);
        y  = (n / (S1 * K1)) % S1;
        x  = (n / K1) % S1;
        k  = n % K1;
        ci = k / 9; dy = (k / 3) % 3; dx = k % 3;
        if (k == 0) begin
          c1[0][o][y][x] = int'(bias1[o]) * 128;
          c1[1][o][y][x] = int'(bias1[o]) * 128;
        end
        xa = x0[ci][y + dy][x + dx];
        mul(xa, int'(w1[o][k]));
        c1[0][o][y][x] += res_approx;
        c1[1][o][y][x] += xa * int'(w1[o][k]);
      end
      for (int n = 0; n < C1 * S1 * S1; n++) begin
        int o, y, x, d;
        o = n / (S1 * S1); y = (n / S1) % S1; x = n % S1;
        d = c1[0][o][y][x] - c1[1][o][y][x];
        err1 += (d < 0) ? real'(-d) : real'(d);
        mag1 += (c1[1][o][y][x] < 0) ? real'(-c1[1][o][y][x]) : real'(c1[1][o][y][x]);
      end

      // PReLU and 2x2 max pooling
      for (int v = 0; v < 2; v++)
        for (int o = 0; o < C1; o++)
          for (int y = 0; y < SP; y++)
            for (int x = 0; x < SP; x++) begin
              int m;
              m = -128;
              for (int q = 0; q < 4; q++) begin
                int r;
                r = requant(c1[v][o][2*y + q/2][2*x + q%2], 8, 1'b1);
                if (r > m) m = r;
              end
              p1[v][o][y][x] = m;
            end

      // conv2
      for (int n = 0; n < C2 * S2 * S2 * K2; n++) begin
        int o, y, x, k, ci, dy, dx;
        o  = n / (S2 * S2 * K2);
        y  = (n / (S2 * K2)) % S2;
        x  = (n / K2) % S2;
        k  = n % K2;
        ci = k / 9; dy = (k / 3) % 3; dx = k % 3;
        if (k == 0) begin
          c2[0][o][y][x] = int'(bias2[o]) * 128;
          c2[1][o][y][x] = int'(bias2[o]) * 128;
        end
        mul(p1[0][ci][y + dy][x + dx], int'(w2[o][k]));
        c2[0][o][y][x] += res_approx;
        c2[1][o][y][x] += p1[1][ci][y + dy][x + dx] * int'(w2[o][k]);
      end

      // conv3 (3x3 input, 1x1 output)
      for (int n = 0; n < C3 * K3; n++) begin
        int o, k, ci, dy, dx;
        o  = n / K3;
        k  = n % K3;
        ci = k / 9; dy = (k / 3) % 3; dx = k % 3;
        if (k == 0) begin
          c3[0][o] = int'(bias3[o]) * 128;
          c3[1][o] = int'(bias3[o]) * 128;
        end
        mul(requant(c2[0][ci][dy][dx], 9, 1'b1), int'(w3[o][k]));
        c3[0][o] += res_approx;
        c3[1][o] += requant(c2[1][ci][dy][dx], 9, 1'b1) * int'(w3[o][k]);
      end

      // 1x1 heads: scores 0..1, box 2..5, landmarks 6..15
      for (int n = 0; n < NH * C3; n++) begin
        int o, k;
        o = n / C3;
        k = n % C3;
        if (k == 0) begin
          hd[0][o] = int'(biash[o]) * 128;
          hd[1][o] = int'(biash[o]) * 128;
        end
        mul(requant(c3[0][k], 9, 1'b1), int'(wh[o][k]));
        hd[0][o] += res_approx;
        hd[1][o] += requant(c3[1][k], 9, 1'b1) * int'(wh[o][k]);
      end
      for (int o = 0; o < NH; o++) begin
        int d;
        d = hd[0][o] - hd[1][o];
        errh += (d < 0) ? real'(-d) : real'(d);
        magh += (hd[1][o] < 0) ? real'(-hd[1][o]) : real'(hd[1][o]);
      end
      if ((hd[0][1] > hd[0][0]) == (hd[1][1] > hd[1][0])) agree++;
      n_mul = cycles - cyc0;
      ratio1 = err1 / mag1;
      ratioh = errh / magh;
    end

    $display("%0d multiplications", n_mul);
    $display("conv1 sums: mean |error| / mean |exact| = %e", ratio1);
    $display("head outputs: mean |error| / mean |exact| = %e", ratioh);
    $display("face decision agrees with the exact network for %0d of %0d windows", agree, NWIN);
    checks += 4;
    // the count is sampled one cycle early, so it may read one short
    if (n_mul > NWIN * (C1 * S1 * S1 * K1 + C2 * S2 * S2 * K2 + C3 * K3 + NH * C3) ||
        n_mul < NWIN * (C1 * S1 * S1 * K1 + C2 * S2 * S2 * K2 + C3 * K3 + NH * C3) - 1) failures++;
    if (!(ratio1 <= 0.01)) failures++;
    if (!(ratioh <= 0.05)) failures++;
    if (agree * 10 < NWIN * 9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
