// tb_ml_booth_mult: all 65536 operand pairs through five multipliers.
//   Exact (P = 0) with each of the three encodings: product must be a*b.
//   Default (encoding B, unbiased, P = 6, T = 1) and classical encoding,
//   unbiased, P = 8, T = 2: product must equal the reference model, and the
//   normalised mean error distance (mean |error| / 2^14) must be close to the
//   published values, 7.1e-4 and 3.3e-3.
module tb_ml_booth_mult;
  import ml_booth_pkg::*;
  import tb_ref_pkg::*;
  logic [7:0]  a, b;
  logic [15:0] p_cg, p_ga, p_gb, p_dflt, p_cg8;
  logic        clk = 1'b0;
  int checks = 0, failures = 0, cycles = 0;
  real sum_ed_dflt = 0.0, sum_ed_cg8 = 0.0;

  ml_booth_mult #(.N(8), .PPG(PPG_MLCG), .P(0), .T(-1)) u_cg (.a(a), .b(b), .product(p_cg));
  ml_booth_mult #(.N(8), .PPG(PPG_MLGA), .P(0), .T(-1)) u_ga (.a(a), .b(b), .product(p_ga));
  ml_booth_mult #(.N(8), .PPG(PPG_MLGB), .P(0), .T(-1)) u_gb (.a(a), .b(b), .product(p_gb));
  ml_booth_mult u_dflt (.a(a), .b(b), .product(p_dflt));
  ml_booth_mult #(.N(8), .PPG(PPG_MLCG), .MODE(APPROX_UNBIASED), .P(8), .T(2))
    u_cg8 (.a(a), .b(b), .product(p_cg8));

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

  task automatic expect_eq(input string name, input logic [15:0] got, input int want);
    checks++;
    if (got !== 16'(want)) begin
      failures++;
      if (failures < 10)
        $display("%s: %0d * %0d = %0d, expected %0d", name, $signed(a), $signed(b), $signed(got), want);
    end
  endtask

  initial begin
    real nmed_d, nmed_c;
    for (int v = 0; v < 65536; v++) begin
      int exact, rd, rc;
      {a, b} = 16'(v);
      @(posedge clk);
      exact = $signed(a) * $signed(b);
      expect_eq("exact MLCG", p_cg, exact);
      expect_eq("exact MLGA", p_ga, exact);
      expect_eq("exact MLGB", p_gb, exact);
      rd = ref_mult(a, b, PPG_MLGB, APPROX_UNBIASED, 6, 1, -1, 1'b0, 1'b0);
      rc = ref_mult(a, b, PPG_MLCG, APPROX_UNBIASED, 8, 2, -1, 1'b0, 1'b0);
      expect_eq("AMLGB unbiased p6 t1", p_dflt, rd);
      expect_eq("AMLCG unbiased p8 t2", p_cg8, rc);
      sum_ed_dflt += (rd > exact) ? real'(rd - exact) : real'(exact - rd);
      sum_ed_cg8  += (rc > exact) ? real'(rc - exact) : real'(exact - rc);
    end
    nmed_d = sum_ed_dflt / 65536.0 / 16384.0;
    nmed_c = sum_ed_cg8 / 65536.0 / 16384.0;
    $display("NMED AMLGB unbiased p6 t1 = %e (published 7.1e-4)", nmed_d);
    $display("NMED AMLCG unbiased p8 t2 = %e (published 3.3e-3)", nmed_c);
    checks += 2;
    if (nmed_d < 0.65e-3 || nmed_d > 0.77e-3) failures++;
    if (nmed_c < 3.0e-3 || nmed_c > 3.6e-3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
