// fredkin_gate: the 3x3 reversible Fredkin (controlled-swap) gate.
//
//   P = A
//   Q = A'B + AC   (B when A = 0, C when A = 1)
//   R = A'C + AB   (C when A = 0, B when A = 1)
// With C = 0, R is the AND of A and B, which is how the multiplier forms its
// partial products. With A as a select, Q is a 2:1 multiplexer and P passes the
// select on, so a chain of these gates shares one select line without fan-out.
// The gate is named, not defined, in the published design; the equations are
// the usual Fredkin definition. Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ? c : b;
    r = a ? b : c;
  end
endmodule
