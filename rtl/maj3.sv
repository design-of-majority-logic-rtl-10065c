// maj3: the 3-input majority voter, y = ab + bc + ac.
//
// This is the logic primitive of majority-based nanotechnologies (nanomagnetic
// logic, spin-transfer-torque magnetic tunnel junctions). With one input tied
// to 0 it is an AND gate, tied to 1 an OR gate. Combinational, one gate delay.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (b & c) | (a & c);
endmodule
