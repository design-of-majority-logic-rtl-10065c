// tb_ref_pkg: reference models for the testbenches, written independently of
// the majority-gate networks in the RTL.
//
// ref_pp / ref_neg follow the radix-4 Booth selection table directly
// (0, +A, +2A, -2A, -A per group, with the negated-zero codes of encodings A
// and B). ref_app gives the approximate PP bits as plain sum-of-products
// expressions. ref_mult adds the PP rows as signed integers (row value =
// -pp_iN*2^N + sum pp_ij*2^j, plus Neg_i), which is a different route from
// the RTL's inverted-sign-bit-plus-constant scheme.
package tb_ref_pkg;
  import ml_booth_pkg::*;

  function automatic bit ref_pp(ppg_e ppg, logic [2:0] g, bit aj, bit aj1);
    case (g)
      3'b000: return (ppg == PPG_MLGA || ppg == PPG_MLGB);
      3'b001, 3'b010: return aj;
      3'b011: return aj1;
      3'b100: return !aj1;
      3'b101, 3'b110: return !aj;
      default: return (ppg == PPG_MLGB);
    endcase
  endfunction

  function automatic bit ref_neg(ppg_e ppg, logic [2:0] g);
    if (g == 3'b000) return (ppg == PPG_MLGA || ppg == PPG_MLGB);
    if (g == 3'b111) return (ppg == PPG_MLGB);
    return g[2];
  endfunction

  function automatic bit m3(bit x, bit y, bit z);
    return (x + y + z) >= 2;
  endfunction

  // Approximate PP bit at row i, bit j; g = {b2i+1, b2i, b2i-1}.
  function automatic bit ref_app(ppg_e ppg, approx_e mode, int i, int j,
                                 logic [2:0] g, bit aj);
    bit b2, b1, b0, c22, c23;
    b2 = g[2]; b1 = g[1]; b0 = g[0];
    // (22) and (23) written as sum of products
    c22 = (b2 && (!b1 && !b0 || !b1 && !aj || !b0 && !aj)) ||
          (!b2 && (!b1 && !b0 || !b1 && aj || !b0 && aj));
    c23 = (!b2 && (!b1 || aj)) || (b2 && !aj);
    case (ppg)
      PPG_MLCG: begin
        if (mode == APPROX_SINGLE || (i == 0 && j == 0))
          return b2 ? !m3(b1, b0, aj) : m3(b1, b0, aj);
        if (i == 0) return b2 ? !aj : (b1 && aj);
        return b2 ? (!aj && !m3(b1, b0, aj)) : (aj && m3(b1, b0, aj));
      end
      PPG_MLGA: begin
        if (mode == APPROX_UNBIASED && i == 0 && j != 0) return c23;
        return c22;
      end
      default: begin
        if (mode == APPROX_SINGLE)
          return b2 ? m3(b1, b0, !aj) : !m3(b1, b0, !aj);
        if (i == 0 && j == 0) return c22;
        if (i == 0) return c23;
        return b2 ? (m3(b1, b0, !aj) || !aj) : (!m3(b1, b0, !aj) || aj);
      end
    endcase
  endfunction

  // Reference N=8 multiplier with the same approximation parameters as
  // ml_booth_mult. Returns the 16-bit result as a signed integer.
  function automatic int ref_mult(logic [7:0] a, logic [7:0] b, ppg_e ppg,
                                  approx_e mode, int p, int t, int l,
                                  bit drop_neg0, bit drop_one0);
    int total;
    logic [2:0] g;
    bit aj, aj1, v;
    total = 0;
    for (int i = 0; i < 4; i++) begin
      int rowv;
      g = {b[2*i+1], b[2*i], (i == 0) ? 1'b0 : b[2*i-1]};
      rowv = 0;
      for (int j = 0; j <= 8; j++) begin
        int col;
        col = 2 * i + j;
        aj  = (j < 8) ? a[j] : a[7];
        aj1 = (j > 0) ? a[j-1] : 1'b0;
        if (col <= t) v = 0;
        else if (col <= l) v = !(drop_one0 && col == 0);
        else if (col < p) v = ref_app(ppg, mode, i, j, g, aj);
        else v = ref_pp(ppg, g, aj, aj1);
        if (j == 8) rowv -= int'(v) * 256;
        else rowv += int'(v) << j;
      end
      if (!((i == 0 && drop_neg0) || 2 * i <= t)) rowv += int'(ref_neg(ppg, g));
      total += rowv * (1 << (2 * i));
    end
    return int'($signed(16'(total)));
  endfunction
endpackage
