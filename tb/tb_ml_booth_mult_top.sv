// tb_ml_booth_mult_top: end-to-end run of the four proposed multipliers over
// all 65536 signed 8-bit operand pairs, with the top at its defaults.
//
// Each product must equal the reference model bit for bit. Over the whole
// operand space the normalised mean error distance (NMED = mean |error| /
// 2^14) of each design must lie within 10 % of its published value; the mean
// relative error distance is printed for information. Every mechanism of the
// design must show up at least once:
//   - approximate PP cells moving a result up and down (each design),
//   - truncation removing non-zero low bits (good, moderate), with the
//     truncated result bits reading 0,
//   - forced ones in columns 0..5 changing the result (low),
//   - leaving out Neg_0 (high) and the column-0 forced one (low) changing
//     the result.
module tb_ml_booth_mult_top;
  import ml_booth_pkg::*;
  import tb_ref_pkg::*;

  localparam int ND = 4;
  localparam string NAME [ND] = '{"high", "good", "moderate", "low"};
  localparam real   PUB_NMED [ND] = '{0.14e-3, 0.71e-3, 1.1e-3, 5.2e-3};

  logic [7:0]  a, b;
  logic [15:0] prod [ND];
  logic        clk = 1'b0;
  int checks = 0, failures = 0, cycles = 0;

  ml_booth_mult_top dut (
    .a(a), .b(b),
    .prod_high(prod[0]), .prod_good(prod[1]),
    .prod_moderate(prod[2]), .prod_low(prod[3])
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic int ref_design(int d, logic [7:0] x, logic [7:0] y);
    case (d)
      0: return ref_mult(x, y, PPG_MLGA, APPROX_UNBIASED, 4, -1, -1, 1'b1, 1'b0);
      1: return ref_mult(x, y, PPG_MLGB, APPROX_UNBIASED, 6, 1, -1, 1'b0, 1'b0);
      2: return ref_mult(x, y, PPG_MLCG, APPROX_SINGLE, 6, 3, -1, 1'b0, 1'b0);
      default: return ref_mult(x, y, PPG_MLGB, APPROX_SINGLE, 8, -1, 5, 1'b0, 1'b1);
    endcase
  endfunction

  task automatic need(input string what, input int count);
    checks++;
    $display("  %-44s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    real sum_ed [ND];
    real sum_red [ND];
    int  n_up [ND];
    int  n_down [ND];
    int  n_trunc_good, n_trunc_mod, n_ones_low, n_neg0, n_one0, n_nonzero;

    for (int d = 0; d < ND; d++) begin
      sum_ed[d] = 0.0; sum_red[d] = 0.0; n_up[d] = 0; n_down[d] = 0;
    end
    n_trunc_good = 0; n_trunc_mod = 0; n_ones_low = 0; n_neg0 = 0; n_one0 = 0;
    n_nonzero = 0;

    for (int v = 0; v < 65536; v++) begin
      int exact;
      {a, b} = 16'(v);
      @(posedge clk);
      exact = $signed(a) * $signed(b);
      if (exact != 0) n_nonzero++;
      for (int d = 0; d < ND; d++) begin
        int want, got;
        real ed;
        want = ref_design(d, a, b);
        got  = int'($signed(prod[d]));
        checks++;
        if (got != want) begin
          failures++;
          if (failures < 10)
            $display("%s: %0d * %0d = %0d, expected %0d", NAME[d], $signed(a), $signed(b), got, want);
        end
        ed = (got > exact) ? real'(got - exact) : real'(exact - got);
        sum_ed[d] += ed;
        if (exact != 0) sum_red[d] += ed / ((exact > 0) ? real'(exact) : real'(-exact));
        if (got > exact) n_up[d]++;
        if (got < exact) n_down[d]++;
      end
      // truncated result bits read 0
      checks += 2;
      if (prod[1][1:0] != 0) failures++;
      if (prod[2][3:0] != 0) failures++;
      // mechanisms, measured on the reference model by switching each one off
      if (ref_mult(a, b, PPG_MLGB, APPROX_UNBIASED, 6, -1, -1, 1'b0, 1'b0) !=
          ref_mult(a, b, PPG_MLGB, APPROX_UNBIASED, 6, 1, -1, 1'b0, 1'b0)) n_trunc_good++;
      if (ref_mult(a, b, PPG_MLCG, APPROX_SINGLE, 6, -1, -1, 1'b0, 1'b0) !=
          ref_mult(a, b, PPG_MLCG, APPROX_SINGLE, 6, 3, -1, 1'b0, 1'b0)) n_trunc_mod++;
      if (ref_mult(a, b, PPG_MLGB, APPROX_SINGLE, 8, -1, -1, 1'b0, 1'b0) !=
          ref_mult(a, b, PPG_MLGB, APPROX_SINGLE, 8, -1, 5, 1'b0, 1'b1)) n_ones_low++;
      if (ref_mult(a, b, PPG_MLGA, APPROX_UNBIASED, 4, -1, -1, 1'b0, 1'b0) !=
          ref_mult(a, b, PPG_MLGA, APPROX_UNBIASED, 4, -1, -1, 1'b1, 1'b0)) n_neg0++;
      if (ref_mult(a, b, PPG_MLGB, APPROX_SINGLE, 8, -1, 5, 1'b0, 1'b0) !=
          ref_mult(a, b, PPG_MLGB, APPROX_SINGLE, 8, -1, 5, 1'b0, 1'b1)) n_one0++;
    end

    for (int d = 0; d < ND; d++) begin
      real nmed, mred;
      nmed = sum_ed[d] / 65536.0 / 16384.0;
      mred = sum_red[d] / real'(n_nonzero);
      $display("%-9s NMED %e (published %e)  MRED %e  results above exact %0d, below %0d",
               NAME[d], nmed, PUB_NMED[d], mred, n_up[d], n_down[d]);
      checks++;
      if (nmed < 0.9 * PUB_NMED[d] || nmed > 1.1 * PUB_NMED[d]) begin
        failures++;
        $display("  NMED of %s outside 10 %% of the published value", NAME[d]);
      end
    end

    $display("mechanism counts over 65536 operand pairs:");
    need("high: approximate cells raise a result", n_up[0]);
    need("high: approximate cells lower a result", n_down[0]);
    need("high: dropped Neg_0 changes a result", n_neg0);
    need("good: results above exact", n_up[1]);
    need("good: results below exact", n_down[1]);
    need("good: truncation of columns 0..1 changes a result", n_trunc_good);
    need("moderate: results above exact", n_up[2]);
    need("moderate: truncation of columns 0..3 changes a result", n_trunc_mod);
    need("low: results below exact", n_down[3]);
    need("low: forced ones in columns 0..5 change a result", n_ones_low);
    need("low: dropped column-0 one changes a result", n_one0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
