// booth_pp_array: radix-4 Booth partial product (PP) generation and reduction
// for an N x N two's-complement multiplier, in majority logic.
//
// The multiplier b is cut into N/2 overlapping groups {b[2i+1], b[2i],
// b[2i-1]} (b[-1] = 0). Group i selects -2A, -A, 0, +A or +2A for PP row i,
// which has N+1 bits pp_i0..pp_iN (a[-1] = 0, a[N] = a[N-1]), made by one PP
// cell per bit, plus the negation bit Neg_i at column 2i. Column numbers count
// from the least significant product bit; pp_ij sits in column 2i+j.
//
// Sign extension is avoided in the usual way: row i carries the inverted sign
// ~pp_iN at column 2i+N and one constant row holds -2^N * (1 + 4 + ... +
// 4^(N/2-1)) mod 2^2N. With N = 8 the constant is 0xAB00.
//
// Approximation and error compensation, all chosen by parameters:
//   P          pp bits in columns 0..P-1 come from the approximate cell of the
//              chosen encoding (PPG) and error style (MODE); the rest and all
//              Neg_i come from the exact cell.
//   T (>= 0)   truncation: columns 0..T are dropped, Neg_i included. Used
//              against positive errors, and to shorten the result.
//   L (>= 0)   columns 0..L have every pp bit forced to 1 (Neg_i kept). Used
//              against the negative errors of the MLGB single-sided cells.
//   DROP_NEG0  Neg_0 is left out (simplifies compression; small extra error).
//   DROP_ONE0  with L >= 0, the forced 1 in column 0 is left out.
// T and L are -1 when unused. 0 <= T < P, 0 <= L < P and P <= N are required.
// All of this follows the specification; the placement of the sign
// correction bits is a standard choice (any placement gives the same sum and
// all of them lie in columns >= N, which are never approximated).
//
// Output: N/2 + 2 rows of 2N bits (N/2 PP rows, the Neg row, the constant
// row), aligned to their columns, for ml_pp_compressor. Combinational.
//
// ax[0] is the constant a[-1] = 0, read only as a[j-1] by exact cells at
// j = 0. Lint reports the bit unused once the constant has been folded into
// those cells; it carries no logic.
module booth_pp_array
  import ml_booth_pkg::*;
#(
  parameter int unsigned N         = 8,
  parameter ppg_e        PPG       = PPG_MLGB,
  parameter approx_e     MODE      = APPROX_UNBIASED,
  parameter int unsigned P         = 6,
  parameter int          T         = 1,
  parameter int          L         = -1,
  parameter bit          DROP_NEG0 = 1'b0,
  parameter bit          DROP_ONE0 = 1'b0,
  localparam int unsigned NR       = N / 2,
  localparam int unsigned W        = 2 * N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [W-1:0] rows [NR+2]
);
  // -2^N * sum(4^i) modulo 2^W
  function automatic logic [W-1:0] sign_constant();
    logic [W-1:0] k;
    k = '0;
    for (int unsigned i = 0; i < NR; i++) k = k - (W'(1) << (N + 2 * i));
    return k;
  endfunction

  if (N < 4 || N % 2 != 0) begin : g_bad_n
    $error("booth_pp_array: N must be even and at least 4");
  end
  if (P > N || T >= int'(P) || L >= int'(P) || T < -1 || L < -1) begin : g_bad_p
    $error("booth_pp_array: need P <= N, -1 <= T < P and -1 <= L < P");
  end

  logic [N:0]   bx;                 // {b, b[-1] = 0}
  logic [N+1:0] ax;                 // {a[N] = a[N-1], a, a[-1] = 0}
  logic [N:0]   pp  [NR];           // pp[i][j] = pp_ij
  logic [NR-1:0] neg;               // Neg_i as used in the sum

  assign bx = {b, 1'b0};
  assign ax = {a[N-1], a, 1'b0};

  for (genvar i = 0; i < NR; i++) begin : g_row
    logic [2:0] grp;

    // bx[k+1] holds b[k], so the group {b[2i+1], b[2i], b[2i-1]} is bx[2i+2:2i]
    assign grp = bx[2*i+2 : 2*i];

    for (genvar j = 0; j <= N; j++) begin : g_bit
      localparam int COLUMN = 2 * i + j;
      // ax[j+1] = a[j], ax[j] = a[j-1]
      if (COLUMN <= T) begin : g_trunc
        assign pp[i][j] = 1'b0;
      end else if (COLUMN <= L) begin : g_one
        assign pp[i][j] = (DROP_ONE0 && COLUMN == 0) ? 1'b0 : 1'b1;
      end else if (COLUMN < int'(P)) begin : g_approx
        logic pa;
        case (PPG)
          PPG_MLCG: begin : g_cg
            amlcg_ppg #(.MODE(MODE), .ROW(i), .COL(j)) u_a (.b(grp), .aj(ax[j+1]), .app(pa));
          end
          PPG_MLGA: begin : g_ga
            amlga_ppg #(.MODE(MODE), .ROW(i), .COL(j)) u_a (.b(grp), .aj(ax[j+1]), .app(pa));
          end
          default: begin : g_gb
            amlgb_ppg #(.MODE(MODE), .ROW(i), .COL(j)) u_a (.b(grp), .aj(ax[j+1]), .app(pa));
          end
        endcase
        assign pp[i][j] = pa;
      end else begin : g_exact
        logic unused_neg;   // Neg_i is taken from the row's own cell below
        case (PPG)
          PPG_MLCG: begin : g_cg
            mlcg_ppg u_e (.b(grp), .aj(ax[j+1]), .aj1(ax[j]), .pp(pp[i][j]), .neg(unused_neg));
          end
          PPG_MLGA: begin : g_ga
            mlga_ppg u_e (.b(grp), .aj(ax[j+1]), .aj1(ax[j]), .pp(pp[i][j]), .neg(unused_neg));
          end
          default: begin : g_gb
            mlgb_ppg u_e (.b(grp), .aj(ax[j+1]), .aj1(ax[j]), .pp(pp[i][j]), .neg(unused_neg));
          end
        endcase
      end
    end

    // Neg_i depends on the Booth group only; one exact cell per row makes it
    // (its pp output, for a[0], is not needed).
    // Neg_0 may be dropped, and Neg_i goes with a truncated column 2i.
    if ((i == 0 && DROP_NEG0) || int'(2 * i) <= T) begin : g_neg_off
      assign neg[i] = 1'b0;
    end else begin : g_neg_cell
      logic unused_pp;
      case (PPG)
        PPG_MLCG: begin : g_cg
          mlcg_ppg u_n (.b(grp), .aj(a[0]), .aj1(1'b0), .pp(unused_pp), .neg(neg[i]));
        end
        PPG_MLGA: begin : g_ga
          mlga_ppg u_n (.b(grp), .aj(a[0]), .aj1(1'b0), .pp(unused_pp), .neg(neg[i]));
        end
        default: begin : g_gb
          mlgb_ppg u_n (.b(grp), .aj(a[0]), .aj1(1'b0), .pp(unused_pp), .neg(neg[i]));
        end
      endcase
    end

    // PP row with its inverted sign bit, shifted to column 2i
    assign rows[i] = W'({~pp[i][N], pp[i][N-1:0]}) << (2 * i);
  end

  // Neg_i at column 2i
  always_comb begin
    rows[NR] = '0;
    for (int unsigned i = 0; i < NR; i++) rows[NR][2*i] = neg[i];
  end

  assign rows[NR+1] = sign_constant();
endmodule
