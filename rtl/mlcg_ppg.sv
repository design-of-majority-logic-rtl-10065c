// mlcg_ppg: exact radix-4 Booth partial product cell, classical encoding
// (MLCG), in majority logic.
//
// Inputs are one Booth group b = {b[2i+1], b[2i], b[2i-1]} and two
// multiplicand bits a[j], a[j-1]. The cell gives the PP bit pp_ij and the
// row's negation bit Neg_i:
//   group 000 / 111 -> 0, 001 / 010 -> +A, 011 -> +2A,
//   100 -> -2A, 101 / 110 -> -A; negation is "invert every bit, add Neg_i".
// The pp_ij network splits the function at b[2i+1] (Shannon expansion) and
// covers most of each half with one majority gate on b[2i], b[2i-1], a[j]:
//   pp = b2i+1 * ~M(b2i,b2i-1,aj) * (b2i + b2i-1 + ~aj-1)
//      + ~b2i+1 * M(b2i,b2i-1,aj) * (~b2i + ~b2i-1 + aj-1)
// 10 majority gates, 4 gate delays. Neg_i = M(b2i+1, 0, M(~b2i, ~b2i-1, 1)),
// 2 gates. These equations follow the specification. Combinational.
module mlcg_ppg
  import ml_booth_pkg::*;
(
  input  logic [2:0] b,     // {b[2i+1], b[2i], b[2i-1]}
  input  logic       aj,    // a[j]
  input  logic       aj1,   // a[j-1]
  output logic       pp,    // pp_ij
  output logic       neg    // Neg_i
);
  logic m_hi;  // M(b2i, b2i-1, aj)

  assign m_hi = maj(b[1], b[0], aj);

  assign pp = maj(maj(maj(b[2], 1'b0, ~m_hi),
                      maj(b[1], 1'b1, maj(b[0], ~aj1, 1'b1)), 1'b0),
                  maj(maj(~b[2], 1'b0, m_hi),
                      maj(aj1, 1'b1, maj(~b[0], ~b[1], 1'b1)), 1'b0),
                  1'b1);

  assign neg = maj(b[2], 1'b0, maj(~b[1], ~b[0], 1'b1));
endmodule
