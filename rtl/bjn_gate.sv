// bjn_gate: the 3x3 reversible BJN gate.
//
//   P = A
//   Q = B
//   R = (A | B) ^ C
// With C = 1, R is the NOR of A and B. The equations follow the published
// gate. Purely combinational.
module bjn_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = (a | b) ^ c;
  end
endmodule
