// ml_booth_mult_top: the four proposed approximate 8x8 signed Booth
// multipliers in majority logic, side by side on shared operands.
//
// Each trades accuracy for majority gates and delay in a different way:
//   prod_high      encoding A (AMLGA), unbiased errors, P = 4, Neg_0 dropped.
//                  NMED ~1.4e-4. For large neural networks.
//   prod_good      encoding B (AMLGB), unbiased errors, P = 6, columns 0..1
//                  truncated. NMED ~7.1e-4, 14 significant bits.
//   prod_moderate  classical encoding (AMLCG), positive single-sided errors,
//                  P = 6, columns 0..3 truncated to offset them. NMED ~1.1e-3,
//                  12 significant bits.
//   prod_low       encoding B (AMLGB), negative single-sided errors, P = 8,
//                  columns 0..5 forced to 1 to offset them, the forced 1 of
//                  column 0 left out. NMED ~5.2e-3.
// The settings follow the specification; sharing the operand inputs is this
// design's choice (each multiplier stands alone). Truncated low bits read 0.
// Purely combinational.
module ml_booth_mult_top
  import ml_booth_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] prod_high,
  output logic [2*N-1:0] prod_good,
  output logic [2*N-1:0] prod_moderate,
  output logic [2*N-1:0] prod_low
);
  ml_booth_mult #(
    .N(N), .PPG(PPG_MLGA), .MODE(APPROX_UNBIASED), .P(4), .T(-1), .L(-1),
    .DROP_NEG0(1'b1), .DROP_ONE0(1'b0)
  ) u_high (.a(a), .b(b), .product(prod_high));

  ml_booth_mult #(
    .N(N), .PPG(PPG_MLGB), .MODE(APPROX_UNBIASED), .P(6), .T(1), .L(-1),
    .DROP_NEG0(1'b0), .DROP_ONE0(1'b0)
  ) u_good (.a(a), .b(b), .product(prod_good));

  ml_booth_mult #(
    .N(N), .PPG(PPG_MLCG), .MODE(APPROX_SINGLE), .P(6), .T(3), .L(-1),
    .DROP_NEG0(1'b0), .DROP_ONE0(1'b0)
  ) u_moderate (.a(a), .b(b), .product(prod_moderate));

  ml_booth_mult #(
    .N(N), .PPG(PPG_MLGB), .MODE(APPROX_SINGLE), .P(8), .T(-1), .L(5),
    .DROP_NEG0(1'b0), .DROP_ONE0(1'b1)
  ) u_low (.a(a), .b(b), .product(prod_low));
endmodule
