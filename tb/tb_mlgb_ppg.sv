// tb_mlgb_ppg: exhaustive check of the exact MLGB Booth cell (all 32 values of
// the Booth group and the two multiplicand bits) against the Booth
// selection table.
module tb_mlgb_ppg;
  import ml_booth_pkg::*;
  import tb_ref_pkg::*;
  logic [2:0] b;
  logic aj, aj1, pp, neg;
  int checks = 0, failures = 0;

  mlgb_ppg dut (.b(b), .aj(aj), .aj1(aj1), .pp(pp), .neg(neg));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      {b, aj, aj1} = 5'(k);
      #1;
      checks += 2;
      if (pp !== ref_pp(PPG_MLGB, b, aj, aj1)) begin
        failures++;
        $display("pp: group %b aj %b aj-1 %b -> %b", b, aj, aj1, pp);
      end
      if (neg !== ref_neg(PPG_MLGB, b)) begin
        failures++;
        $display("neg: group %b -> %b", b, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
