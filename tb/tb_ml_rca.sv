// tb_ml_rca: the 16-bit ripple-carry adder against integer addition, on
// corner cases (long carry chains) and random operands.
module tb_ml_rca;
  localparam int unsigned W = 16;
  logic [W-1:0] x, y, s;
  logic         cin;
  logic         clk = 1'b0;
  int checks = 0, failures = 0, cycles = 0;

  ml_rca #(.W(W)) dut (.x(x), .y(y), .cin(cin), .s(s));

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

  task automatic check(input logic [W-1:0] xx, input logic [W-1:0] yy, input logic cc);
    logic [W-1:0] expect_s;
    x = xx; y = yy; cin = cc;
    @(posedge clk);
    expect_s = W'(int'(xx) + int'(yy) + int'(cc));
    checks++;
    if (s !== expect_s) begin
      failures++;
      $display("rca %h + %h + %b = %h, expected %h", xx, yy, cc, s, expect_s);
    end
  endtask

  initial begin
    check('1, '0, 1'b1);
    check('1, 16'd1, 1'b0);
    check(16'h7fff, 16'h0001, 1'b0);
    check(16'haaaa, 16'h5555, 1'b1);
    check('0, '0, 1'b0);
    for (int k = 0; k < 3000; k++) check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
