// ml_booth_pkg: types and the majority function shared by the majority-logic
// (ML) radix-4 Booth multipliers.
//
// Every logic function in this design is written as nested 3-input majority
// gates M(x,y,z) = xy + yz + xz plus inverters, the only primitives of
// majority-based nanotechnologies. AND and OR are a majority gate with one
// input tied to 0 or 1. The function maj() is that gate; maj3.sv is the same
// gate as a module, for structural use.
//
// ppg_e picks the Booth partial product (PP) encoding:
//   PPG_MLCG  classical encoding; group 111 gives PP 0 and Neg 0.
//   PPG_MLGA  group 000 gives "negated zero": all PP bits 1 and Neg 1.
//   PPG_MLGB  both 000 and 111 give negated zero.
// approx_e picks how the approximate PP cells introduce errors:
//   APPROX_SINGLE    single-sided errors: positive for MLCG, negative for
//                    MLGB; for MLGA the same form is used everywhere (biased
//                    double-sided errors).
//   APPROX_UNBIASED  different equations for row 0, bit (0,0) and the
//                    other rows, so that positive and negative errors balance.
package ml_booth_pkg;

  typedef enum logic [1:0] {
    PPG_MLCG = 2'd0,
    PPG_MLGA = 2'd1,
    PPG_MLGB = 2'd2
  } ppg_e;

  typedef enum logic [0:0] {
    APPROX_SINGLE   = 1'b0,
    APPROX_UNBIASED = 1'b1
  } approx_e;

  // 3-input majority gate.
  function automatic logic maj(input logic x, input logic y, input logic z);
    return (x & y) | (y & z) | (x & z);
  endfunction

endpackage
