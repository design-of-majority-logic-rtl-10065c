// amlcg_ppg: approximate classical-encoding Booth PP cell (AMLCG) in majority
// logic.
//
// The exact classical PP bit is a sum of two terms, each a majority gate
// "in curly brackets" times a 3-input OR. The approximations drop or replace
// the OR factors, which removes gates at the cost of errors in the K-map
// cells where the Booth group is 011 or 100 (4 of 32 input cases, 12.5 %).
// The cell is used only in the p least significant columns of the PP array;
// its position (ROW = i, COL = j) selects the equation at elaboration:
//
//   MODE = APPROX_SINGLE (positive single-sided errors), every position:
//     (16) app = b2i+1 * ~M(b2i,b2i-1,aj) + ~b2i+1 * M(b2i,b2i-1,aj)
//   MODE = APPROX_UNBIASED (as many positive as negative errors):
//     row 0, j > 0: (18) app = M(M(~b1, M(b0,0,aj), 0), M(b1, ~aj, 0), 1)
//     row 0, j = 0: (16), which is exact there
//     other rows:   (17) app = b2i+1 * ~aj * ~M(b2i,b2i-1,aj)
//                            + ~b2i+1 *  aj *  M(b2i,b2i-1,aj)
//
// Equations follow the specification. Neg_i is not approximated; the array
// takes it from the exact cell. For row 0 the array ties b[0] (b[-1]) to 0.
// Combinational.
module amlcg_ppg
  import ml_booth_pkg::*;
#(
  parameter approx_e     MODE = APPROX_SINGLE,
  parameter int unsigned ROW  = 1,
  parameter int unsigned COL  = 1
) (
  input  logic [2:0] b,     // {b[2i+1], b[2i], b[2i-1]}
  input  logic       aj,    // a[j]
  output logic       app    // approximate pp_ij
);
  logic m;  // M(b2i, b2i-1, aj)

  assign m = maj(b[1], b[0], aj);

  if (MODE == APPROX_SINGLE || (ROW == 0 && COL == 0)) begin : g_eq16
    assign app = maj(maj(b[2], ~m, 1'b0), maj(~b[2], m, 1'b0), 1'b1);
  end else if (ROW == 0) begin : g_eq18
    assign app = maj(maj(~b[2], maj(b[1], 1'b0, aj), 1'b0),
                     maj(b[2], ~aj, 1'b0), 1'b1);
  end else begin : g_eq17
    assign app = maj(maj(maj(b[2], ~aj, 1'b0), ~m, 1'b0),
                     maj(maj(~b[2], aj, 1'b0), m, 1'b0), 1'b1);
  end
endmodule
