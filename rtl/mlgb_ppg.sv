// mlgb_ppg: exact radix-4 Booth partial product cell, encoding B (MLGB), in
// majority logic.
//
// Both zero groups, 000 and 111, are coded as a negated zero (all PP bits 1,
// Neg_i = 1). pp_ij then has most of its true cases under one shared gate
// m = M(b2i, b2i-1, ~aj):
//   pp = b2i+1 * m + ~b2i+1 * ~m + ~b2i * ~b2i-1 * ~aj-1 + b2i * b2i-1 * aj-1
// 10 majority gates, 4 gate delays. Neg_i = M(~b2i, ~b2i-1, 0) + b2i+1,
// 2 gates. These equations follow the specification. Ports as in mlcg_ppg.
// Combinational.
module mlgb_ppg
  import ml_booth_pkg::*;
(
  input  logic [2:0] b,     // {b[2i+1], b[2i], b[2i-1]}
  input  logic       aj,    // a[j]
  input  logic       aj1,   // a[j-1]
  output logic       pp,    // pp_ij
  output logic       neg    // Neg_i
);
  logic m;        // M(b2i, b2i-1, ~aj)
  logic both_lo;  // M(~b2i-1, ~b2i, 0): group bits b2i, b2i-1 both 0

  assign m       = maj(b[1], b[0], ~aj);
  assign both_lo = maj(~b[0], ~b[1], 1'b0);

  assign pp = maj(maj(maj(m, b[2], 1'b0), maj(~m, ~b[2], 1'b0), 1'b1),
                  maj(maj(~aj1, both_lo, 1'b0),
                      maj(b[1], maj(b[0], aj1, 1'b0), 1'b0), 1'b1),
                  1'b1);

  assign neg = maj(b[2], 1'b1, both_lo);
endmodule
