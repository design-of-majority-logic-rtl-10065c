// amlga_ppg: approximate encoding-A Booth PP cell (AMLGA) in majority logic.
//
// Encoding A codes group 000 as a negated zero (all PP bits 1, Neg_i = 1).
// The approximation keeps only the two majority terms of the exact cell:
//   (22) app = b2i+1 * M(~b2i,~b2i-1,~aj) + ~b2i+1 * M(~b2i,~b2i-1,aj)
// which errs in 4 of 32 input cases, two upwards and two downwards. In row 0
// (where b[-1] = 0) this form would err only one way, so with
// MODE = APPROX_UNBIASED row 0, j > 0 uses
//   (23) app = ~b1 * M(~b1, ~b0, aj) + b1 * ~aj
// instead, while bit (0,0) keeps (22), which is exact there.
// MODE = APPROX_SINGLE uses (22) everywhere (biased double-sided errors).
// Position (ROW = i, COL = j) is a parameter. Equations follow the
// specification; Neg_i comes from the exact cell. Combinational.
//
// In row 0, equation (23) does not read b[2i-1] (it is 0 there); the input
// stays so that every cell has the same ports, and lint reports it unused.
module amlga_ppg
  import ml_booth_pkg::*;
#(
  parameter approx_e     MODE = APPROX_UNBIASED,
  parameter int unsigned ROW  = 1,
  parameter int unsigned COL  = 1
) (
  input  logic [2:0] b,     // {b[2i+1], b[2i], b[2i-1]}
  input  logic       aj,    // a[j]
  output logic       app    // approximate pp_ij
);
  if (MODE == APPROX_UNBIASED && ROW == 0 && COL != 0) begin : g_eq23
    assign app = maj(maj(~b[2], maj(~b[2], ~b[1], aj), 1'b0),
                     maj(b[2], ~aj, 1'b0), 1'b1);
  end else begin : g_eq22
    assign app = maj(maj(b[2], maj(~b[1], ~b[0], ~aj), 1'b0),
                     maj(~b[2], maj(~b[1], ~b[0], aj), 1'b0), 1'b1);
  end
endmodule
