// tb_amlcg_ppg: the approximate AMLCG Booth cell at several positions and in
// both error modes. Every reachable input is applied (in row 0 the bit below
// the group, b[-1], is 0; at j = 0, a[j-1] is 0). The output must match the
// sum-of-products form of its equation, and its errors against the exact
// Booth table must have the expected count and direction: one-directional
// for single-sided cells, balanced for unbiased ones, none at bit (0,0).
module tb_amlcg_ppg;
  import ml_booth_pkg::*;
  import tb_ref_pkg::*;
  logic [2:0] b;
  logic       aj, aj1;
  logic [4:0] app;
  int checks = 0, failures = 0;

  amlcg_ppg #(.MODE(APPROX_SINGLE), .ROW(1), .COL(1)) dut0 (.b(b), .aj(aj), .app(app[0]));
  amlcg_ppg #(.MODE(APPROX_SINGLE), .ROW(0), .COL(3)) dut1 (.b(b), .aj(aj), .app(app[1]));
  amlcg_ppg #(.MODE(APPROX_UNBIASED), .ROW(0), .COL(0)) dut2 (.b(b), .aj(aj), .app(app[2]));
  amlcg_ppg #(.MODE(APPROX_UNBIASED), .ROW(0), .COL(3)) dut3 (.b(b), .aj(aj), .app(app[3]));
  amlcg_ppg #(.MODE(APPROX_UNBIASED), .ROW(2), .COL(3)) dut4 (.b(b), .aj(aj), .app(app[4]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input int k, input approx_e mode, input int i, input int j,
                          input int want_pos, input int want_neg);
    int npos, nneg;
    bit want, ex;
    npos = 0;
    nneg = 0;
    for (int v = 0; v < 32; v++) begin
      {b, aj, aj1} = 5'(v);
      if (!(i == 0 && b[0]) && !(j == 0 && aj1)) begin
        #1;
        want = ref_app(PPG_MLCG, mode, i, j, b, aj);
        ex   = ref_pp(PPG_MLCG, b, aj, aj1);
        checks++;
        if (app[k] !== want) begin
          failures++;
          $display("cell %0d (%0d,%0d): group %b aj %b -> %b, expected %b", k, i, j, b, aj, app[k], want);
        end
        if (app[k] && !ex) npos++;
        if (!app[k] && ex) nneg++;
      end
    end
    checks++;
    if (npos != want_pos || nneg != want_neg) begin
      failures++;
      $display("cell %0d (%0d,%0d): %0d upward and %0d downward errors, expected %0d and %0d",
               k, i, j, npos, nneg, want_pos, want_neg);
    end
  endtask

  initial begin
    run_case(0, APPROX_SINGLE, 1, 1, 4, 0);
    run_case(1, APPROX_SINGLE, 0, 3, 2, 0);
    run_case(2, APPROX_UNBIASED, 0, 0, 0, 0);
    run_case(3, APPROX_UNBIASED, 0, 3, 1, 1);
    run_case(4, APPROX_UNBIASED, 2, 3, 2, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
