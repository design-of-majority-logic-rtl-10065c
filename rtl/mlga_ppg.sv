// mlga_ppg: exact radix-4 Booth partial product cell, encoding A (MLGA), in
// majority logic.
//
// Like the classical encoding except that group 000 is coded as a negated
// zero: every PP bit is 1 and Neg_i is 1, which still sums to 0. This turns
// Neg_i into a single gate, Neg_i = M(b2i+1, ~b2i, ~b2i-1), and lets the
// b[2i+1]=0 half of pp_ij be covered by M(~b2i, ~b2i-1, aj):
//   pp = b2i+1 * M(~b2i,~b2i-1,~aj) * (b2i + b2i-1 + ~aj-1)
//      + ~b2i+1 * M(~b2i,~b2i-1,aj) + ~b2i+1 * b2i * b2i-1 * aj-1
// 12 majority gates, 4 gate delays, for pp_ij; 1 gate for Neg_i. These
// equations follow the specification. Ports as in mlcg_ppg. Combinational.
module mlga_ppg
  import ml_booth_pkg::*;
(
  input  logic [2:0] b,     // {b[2i+1], b[2i], b[2i-1]}
  input  logic       aj,    // a[j]
  input  logic       aj1,   // a[j-1]
  output logic       pp,    // pp_ij
  output logic       neg    // Neg_i
);
  assign pp = maj(maj(maj(b[2], 1'b0, maj(~b[1], ~b[0], ~aj)),
                      maj(b[1], 1'b1, maj(b[0], ~aj1, 1'b1)), 1'b0),
                  maj(maj(~b[2], 1'b0, maj(~b[1], ~b[0], aj)),
                      maj(maj(~b[2], b[1], 1'b0), maj(b[0], aj1, 1'b0), 1'b0),
                      1'b1),
                  1'b1);

  assign neg = maj(b[2], ~b[1], ~b[0]);
endmodule
