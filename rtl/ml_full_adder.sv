// ml_full_adder: exact 1-bit full adder made of three majority gates.
//
//   cout = M(a, b, cin)
//   sum  = M(~cout, cin, M(a, b, ~cin))
//
// cout and M(a, b, ~cin) are computed side by side, so the sum is ready after
// two majority-gate delays and the carry after one. The adder is known to take
// two gate delays; the three-gate arrangement is this design's choice, since
// the exact gate netlist is not part of the specification.
module ml_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic m_abnc;

  maj3 u_carry (.a(a), .b(b), .c(cin),  .y(cout));
  maj3 u_part  (.a(a), .b(b), .c(~cin), .y(m_abnc));
  maj3 u_sum   (.a(~cout), .b(cin), .c(m_abnc), .y(sum));
endmodule
