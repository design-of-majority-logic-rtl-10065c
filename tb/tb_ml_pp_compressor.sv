// tb_ml_pp_compressor: the carry-save tree plus ripple-carry adder must
// return the sum of all rows modulo 2^W. Checked for the default 6 rows and
// for 2 and 9 rows (no tree, and a four-level tree).
module tb_ml_pp_compressor;
  localparam int unsigned W = 16;
  logic [W-1:0] r6 [6];
  logic [W-1:0] r2 [2];
  logic [W-1:0] r9 [9];
  logic [W-1:0] s6, s2, s9;
  logic clk = 1'b0;
  int checks = 0, failures = 0, cycles = 0;

  ml_pp_compressor                   dut6 (.rows(r6), .sum(s6));
  ml_pp_compressor #(.ROWS(2), .W(W)) dut2 (.rows(r2), .sum(s2));
  ml_pp_compressor #(.ROWS(9), .W(W)) dut9 (.rows(r9), .sum(s9));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic compare(input string name, input logic [W-1:0] got, input logic [W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: sum %h, expected %h", name, got, want);
    end
  endtask

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int t6, t2, t9;
      t6 = 0; t2 = 0; t9 = 0;
      for (int r = 0; r < 6; r++) begin
        r6[r] = (k < 10) ? '1 : W'($urandom);
        t6 += int'(r6[r]);
      end
      for (int r = 0; r < 2; r++) begin
        r2[r] = W'($urandom);
        t2 += int'(r2[r]);
      end
      for (int r = 0; r < 9; r++) begin
        r9[r] = W'($urandom);
        t9 += int'(r9[r]);
      end
      @(posedge clk);
      compare("6 rows", s6, W'(t6));
      compare("2 rows", s2, W'(t2));
      compare("9 rows", s9, W'(t9));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
