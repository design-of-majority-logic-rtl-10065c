// ml_rca: W-bit ripple-carry adder of majority-logic full adders.
//
// s = (x + y + cin) mod 2^W; the carry out of the top bit is dropped, as the
// multiplier keeps only 2N product bits. The carry ripples through one majority
// gate per bit. Combinational.
//
// The carry out of the top bit, c[W], is discarded: the sum is modulo 2^W.
module ml_rca #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < W; k++) begin : g_bit
    ml_full_adder u_fa (
      .a   (x[k]),
      .b   (y[k]),
      .cin (c[k]),
      .sum (s[k]),
      .cout(c[k+1])
    );
  end
endmodule
