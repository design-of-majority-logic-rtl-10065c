// amlgb_ppg: approximate encoding-B Booth PP cell (AMLGB) in majority logic.
//
// Encoding B codes groups 000 and 111 as a negated zero. With m =
// M(b2i, b2i-1, ~aj) the exact cell is b2i+1*m + ~b2i+1*~m plus two
// correction terms that involve a[j-1]. The approximations:
//   MODE = APPROX_SINGLE (negative single-sided errors), every position:
//     (24) app = b2i+1 * m + ~b2i+1 * ~m
//     (the corrections are dropped: 4 of 32 cases read 0 instead of 1)
//   MODE = APPROX_UNBIASED:
//     row 0, j > 0: (23) app = ~b1 * M(~b1, ~b0, aj) + b1 * ~aj
//     row 0, j = 0: (22) app = b1 * M(~b0,1,~a0) + ~b1 * M(~b0,1,a0), exact
//     other rows:   (25) app = b2i+1 * (m + ~aj) + ~b2i+1 * (~m + aj)
//     (the corrections are replaced by terms in a[j], 2 errors each way)
// Position (ROW = i, COL = j) is a parameter. Equations follow the
// specification; Neg_i comes from the exact cell. Combinational.
//
// In row 0, equation (23) does not read b[2i-1] (it is 0 there); the input
// stays so that every cell has the same ports, and lint reports it unused.
module amlgb_ppg
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
  if (MODE == APPROX_SINGLE) begin : g_eq24
    logic m;  // M(b2i, b2i-1, ~aj)
    assign m   = maj(b[1], b[0], ~aj);
    assign app = maj(maj(b[2], m, 1'b0), maj(~b[2], ~m, 1'b0), 1'b1);
  end else if (ROW == 0 && COL == 0) begin : g_eq22
    assign app = maj(maj(b[2], maj(~b[1], ~b[0], ~aj), 1'b0),
                     maj(~b[2], maj(~b[1], ~b[0], aj), 1'b0), 1'b1);
  end else if (ROW == 0) begin : g_eq23
    assign app = maj(maj(~b[2], maj(~b[2], ~b[1], aj), 1'b0),
                     maj(b[2], ~aj, 1'b0), 1'b1);
  end else begin : g_eq25
    logic m;  // M(b2i, b2i-1, ~aj)
    assign m   = maj(b[1], b[0], ~aj);
    assign app = maj(maj(b[2], maj(m, ~aj, 1'b1), 1'b0),
                     maj(~b[2], maj(~m, aj, 1'b1), 1'b0), 1'b1);
  end
endmodule
