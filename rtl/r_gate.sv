// r_gate: the 3x3 reversible R gate.
//
//   P = A ^ B
//   Q = A
//   R = (A & B) ^ C'
// With C = 1 it yields both the XOR of A and B and their AND, which is what
// the comparator cell needs. The published design uses this gate by name only;
// these equations are the common R-gate definition, chosen because they make
// the printed comparator-cell outputs come out exactly. Purely combinational.
module r_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a ^ b;
    q = a;
    r = (a & b) ^ ~c;
  end
endmodule
