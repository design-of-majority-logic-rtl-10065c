// tb_workload_mlp: inference of a 784-100-10 multilayer perceptron whose
// multiplications all go through the good-accuracy multiplier (prod_good),
// next to the same network with exact products.
//
// Weights, inputs and biases are 8-bit signed integers in [-128, 127],
// generated with a fixed-seed linear congruential generator (no trained
// network is involved). Hidden activations are ReLU(sum) scaled back into
// 0..127 by an arithmetic shift. For each of NSAMP inputs the testbench
// compares the 100 hidden sums of the two networks and the predicted class
// (arg max of the 10 outputs). Checks: the mean absolute error of the hidden
// sums stays below 3 % of their mean magnitude, and the predicted class
// agrees for at least 90 % of the inputs. 79,400 multiplications per input.
// The good-accuracy multiplier truncates two columns, so its errors lean
// downwards and add up along a 784-term sum: about 1.6 % is measured, and the
// check allows 3 %.
module tb_workload_mlp;
  localparam int NIN = 784, NHID = 100, NOUT = 10, NSAMP = 20;

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
    if (cycles > 2000000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  int unsigned lcg_state = 32'h1234_5678;
  function automatic int rnd8();
    lcg_state = lcg_state * 32'd1664525 + 32'd1013904223;
    return int'($signed(lcg_state[31:24]));
  endfunction

  byte w1 [NHID][NIN];
  byte w2 [NOUT][NHID];
  byte b1 [NHID];
  byte b2 [NOUT];

  int res_approx;   // product of the last mul() call

  task automatic mul(input int op_a, input int op_b);
    a = 8'(op_a);
    b = 8'(op_b);
    @(posedge clk);
    res_approx = int'($signed(p_good));
  endtask

  real err_sum, mag_sum;
  int  rel_n, agree;

  initial begin
    byte xin [NIN];
    int  ha [NHID], he [NHID];
    int  oa [NOUT], oe [NOUT];

    for (int h = 0; h < NHID; h++) begin
      for (int i = 0; i < NIN; i++) w1[h][i] = byte'(rnd8());
      b1[h] = byte'(rnd8());
    end
    for (int o = 0; o < NOUT; o++) begin
      for (int h = 0; h < NHID; h++) w2[o][h] = byte'(rnd8());
      b2[o] = byte'(rnd8());
    end

    err_sum = 0.0;
    mag_sum = 0.0;
    rel_n = 0;
    agree = 0;
    for (int s = 0; s < NSAMP; s++) begin
      int best_a, best_e;
      for (int i = 0; i < NIN; i++) xin[i] = byte'(rnd8() & 32'h7f);  // pixel-like, 0..127
      for (int h = 0; h < NHID; h++) begin
        int acc_a, acc_e;
        acc_a = int'(b1[h]) * 128;
        acc_e = acc_a;
        for (int i = 0; i < NIN; i++) begin
          mul(int'(xin[i]), int'(w1[h][i]));
          acc_a += res_approx;
          acc_e += int'(xin[i]) * int'(w1[h][i]);
        end
        err_sum += (acc_a > acc_e) ? real'(acc_a - acc_e) : real'(acc_e - acc_a);
        mag_sum += (acc_e > 0) ? real'(acc_e) : real'(-acc_e);
        rel_n++;
        // ReLU, then scale into 0..127
        ha[h] = (acc_a > 0) ? ((acc_a >>> 13) > 127 ? 127 : (acc_a >>> 13)) : 0;
        he[h] = (acc_e > 0) ? ((acc_e >>> 13) > 127 ? 127 : (acc_e >>> 13)) : 0;
      end
      for (int o = 0; o < NOUT; o++) begin
        oa[o] = int'(b2[o]) * 128;
        oe[o] = oa[o];
        for (int h = 0; h < NHID; h++) begin
          mul(ha[h], int'(w2[o][h]));
          oa[o] += res_approx;
          oe[o] += he[h] * int'(w2[o][h]);
        end
      end
      best_a = 0;
      best_e = 0;
      for (int o = 1; o < NOUT; o++) begin
        if (oa[o] > oa[best_a]) best_a = o;
        if (oe[o] > oe[best_e]) best_e = o;
      end
      if (best_a == best_e) agree++;
    end

    $display("hidden sums: mean |error| / mean |exact sum| = %e over %0d sums", err_sum / mag_sum, rel_n);
    $display("predicted class agrees with the exact network for %0d of %0d inputs", agree, NSAMP);
    checks += 2;
    if (err_sum / mag_sum > 0.03) failures++;
    if (agree * 10 < NSAMP * 9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
