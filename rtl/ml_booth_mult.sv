// ml_booth_mult: N x N signed radix-4 Booth multiplier in majority logic,
// exact or approximate.
//
// booth_pp_array builds the partial product array (approximate cells in the
// P least significant columns, then truncation, forced ones or dropped bits
// as set by T, L, DROP_NEG0 and DROP_ONE0); ml_pp_compressor sums it with
// exact majority-logic full adders and a ripple-carry adder. product is the
// 2N-bit two's-complement result. Truncated columns 0..T read as 0, so the
// result has 2N-(T+1) significant bits.
//
// With P = 0 (and T = L = -1) the multiplier is exact for every encoding.
// The defaults are the "good accuracy" setting: encoding B, unbiased
// errors, P = 6, T = 1 (NMED about 7.1e-4). ml_booth_mult_top lists the other
// proposed settings. Purely combinational: no clock, no registers.
module ml_booth_mult
  import ml_booth_pkg::*;
#(
  parameter int unsigned N         = 8,
  parameter ppg_e        PPG       = PPG_MLGB,
  parameter approx_e     MODE      = APPROX_UNBIASED,
  parameter int unsigned P         = 6,
  parameter int          T         = 1,
  parameter int          L         = -1,
  parameter bit          DROP_NEG0 = 1'b0,
  parameter bit          DROP_ONE0 = 1'b0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] product
);
  logic [2*N-1:0] rows [N/2+2];

  booth_pp_array #(
    .N(N), .PPG(PPG), .MODE(MODE), .P(P), .T(T), .L(L),
    .DROP_NEG0(DROP_NEG0), .DROP_ONE0(DROP_ONE0)
  ) u_array (
    .a   (a),
    .b   (b),
    .rows(rows)
  );

  ml_pp_compressor #(.ROWS(N/2+2), .W(2*N)) u_compress (
    .rows(rows),
    .sum (product)
  );
endmodule
