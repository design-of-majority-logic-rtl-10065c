// tb_booth_pp_array: all 65536 operand pairs through two PP arrays.
//   u_exact: encoding B, no approximation. The rows must add up to a*b.
//   u_dflt:  default parameters (encoding B, unbiased, P = 6, T = 1). The
//            rows must add up to the reference model, and columns 0..T must
//            hold no bit at all (truncation).
module tb_booth_pp_array;
  import ml_booth_pkg::*;
  import tb_ref_pkg::*;
  logic [7:0]  a, b;
  logic [15:0] rows_x [6];
  logic [15:0] rows_d [6];
  logic        clk = 1'b0;
  int checks = 0, failures = 0, cycles = 0;

  booth_pp_array #(.N(8), .PPG(PPG_MLGB), .MODE(APPROX_UNBIASED), .P(0), .T(-1), .L(-1))
    u_exact (.a(a), .b(b), .rows(rows_x));
  booth_pp_array u_dflt (.a(a), .b(b), .rows(rows_d));

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

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int sx, sd, want;
      logic [15:0] low;
      {a, b} = 16'(v);
      @(posedge clk);
      sx = 0;
      sd = 0;
      low = '0;
      for (int r = 0; r < 6; r++) begin
        sx += int'(rows_x[r]);
        sd += int'(rows_d[r]);
        low |= rows_d[r] & 16'h0003;
      end
      checks += 3;
      if (16'(sx) !== 16'($signed(a) * $signed(b))) begin
        failures++;
        if (failures < 10) $display("exact %0d*%0d: rows sum to %h", $signed(a), $signed(b), 16'(sx));
      end
      want = ref_mult(a, b, PPG_MLGB, APPROX_UNBIASED, 6, 1, -1, 1'b0, 1'b0);
      if (16'(sd) !== 16'(want)) begin
        failures++;
        if (failures < 10) $display("default %0d*%0d: rows sum to %h, expected %h", $signed(a), $signed(b), 16'(sd), 16'(want));
      end
      if (low != 0) begin
        failures++;
        if (failures < 10) $display("default %0d*%0d: bits present in truncated columns", $signed(a), $signed(b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
