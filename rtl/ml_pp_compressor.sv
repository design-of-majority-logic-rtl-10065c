// ml_pp_compressor: adds the rows of a partial product (PP) array with
// majority-logic full adders.
//
// The input is ROWS rows of W bits, each already aligned to its column
// weights. A carry-save tree reduces them to two rows: at each level the rows
// are taken three at a time and one full adder per column turns the three
// bits into a sum bit (same column) and a carry bit (next column up); the one
// or two rows left over pass to the next level unchanged. 6 rows take three
// levels (6 -> 4 -> 3 -> 2). A W-bit ripple-carry adder of the same full
// adders then adds the last two rows. The result is the exact sum modulo 2^W.
//
// Exact full adders are used throughout, as specified for the proposed
// multipliers. The specification compresses each multiplier's PP array by a
// hand-placed arrangement of full adders that skips empty and constant
// positions; this generic tree gives the same sum with the positions left to
// synthesis, which removes adders whose inputs are constant.
// Combinational.
//
// The carry out of the top column of each full-adder level is dropped: the
// sum is taken modulo 2^W, as a two's-complement product needs.
module ml_pp_compressor #(
  parameter int unsigned ROWS = 6,
  parameter int unsigned W    = 16
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum
);
  // Rows left after one carry-save level.
  function automatic int unsigned rows_after(input int unsigned r);
    return (r / 3) * 2 + (r % 3);
  endfunction

  // Rows present at a given level of the tree.
  function automatic int unsigned rows_at(input int unsigned level);
    int unsigned r;
    r = ROWS;
    for (int unsigned k = 0; k < level; k++) r = rows_after(r);
    return r;
  endfunction

  // Number of carry-save levels needed to get down to two rows.
  function automatic int unsigned num_levels();
    int unsigned r;
    int unsigned n;
    r = ROWS;
    n = 0;
    while (r > 2) begin
      r = rows_after(r);
      n++;
    end
    return n;
  endfunction

  localparam int unsigned NLEV = num_levels();
  localparam int unsigned RMAX = (ROWS > 2) ? ROWS : 2;

  // Level 0 is the input array, padded with zero rows up to two rows. Each
  // level of the tree has its own row array (g_lvl[L].nxt).
  logic [W-1:0] lvl0 [RMAX];

  for (genvar r = 0; r < RMAX; r++) begin : g_in
    if (r < ROWS) begin : g_row
      assign lvl0[r] = rows[r];
    end else begin : g_pad
      assign lvl0[r] = '0;
    end
  end

  for (genvar L = 0; L < NLEV; L++) begin : g_lvl
    localparam int unsigned RIN  = rows_at(L);
    localparam int unsigned NGRP = RIN / 3;
    localparam int unsigned ROUT = rows_after(RIN);

    logic [W-1:0] cur [RMAX];   // rows entering this level
    logic [W-1:0] nxt [RMAX];   // rows leaving it

    if (L == 0) begin : g_first
      assign cur = lvl0;
    end else begin : g_next
      assign cur = g_lvl[L-1].nxt;
    end

    for (genvar g = 0; g < NGRP; g++) begin : g_grp
      logic [W-1:0] s;
      logic [W-1:0] c;
      for (genvar k = 0; k < W; k++) begin : g_col
        ml_full_adder u_fa (
          .a   (cur[3*g][k]),
          .b   (cur[3*g+1][k]),
          .cin (cur[3*g+2][k]),
          .sum (s[k]),
          .cout(c[k])
        );
      end
      // the carry out of the top column falls outside the 2N-bit result
      assign nxt[2*g]   = s;
      assign nxt[2*g+1] = {c[W-2:0], 1'b0};
    end

    for (genvar r = 3*NGRP; r < RIN; r++) begin : g_pass
      assign nxt[2*NGRP + (r - 3*NGRP)] = cur[r];
    end

    for (genvar r = ROUT; r < RMAX; r++) begin : g_zero
      assign nxt[r] = '0;
    end
  end

  logic [W-1:0] last [RMAX];

  if (NLEV == 0) begin : g_no_tree
    assign last = lvl0;
  end else begin : g_tree
    assign last = g_lvl[NLEV-1].nxt;
  end

  ml_rca #(.W(W)) u_rca (
    .x  (last[0]),
    .y  (last[1]),
    .cin(1'b0),
    .s  (sum)
  );
endmodule
