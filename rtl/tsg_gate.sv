// tsg_gate: the 4x4 reversible Thapliyal-Srinivas gate (TSG).
//
// Outputs, with A..D the inputs:
//   P = A
//   Q = A'C' ^ B'
//   R = Q ^ D
//   S = (Q & D) ^ (A & B ^ C)
// The mapping is one-to-one over the 16 input patterns. With C = 0 the gate is
// a full adder: Q = A ^ B (propagate), R = A ^ B ^ D (sum), S = carry out,
// taking D as the carry in. With C = D = 0, Q alone is an XOR of A and B.
// Equations and truth table follow the published gate; purely combinational.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = a;
    q = (~a & ~c) ^ ~b;
    r = q ^ d;
    s = (q & d) ^ ((a & b) ^ c);
  end
endmodule
