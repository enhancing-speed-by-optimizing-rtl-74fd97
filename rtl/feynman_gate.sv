// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
//   P = A
//   Q = A ^ B
// With A tied to 1 it inverts B and passes the constant on. Named, not defined,
// in the published design; the equations are the usual Feynman definition.
// Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
