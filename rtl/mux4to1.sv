// mux4to1: 1-bit 4:1 reversible multiplexer.
//
// z = S1'S0'I0 + S1'S0 I1 + S1 S0'I2 + S1 S0 I3, with select lines s0, s1.
// Three 3x3 gates, arranged as in the published circuit: the first picks
// between i0 and i1 under s0 and passes s0 on to the second, which picks
// between i2 and i3; the third picks between the two under s1. Its other
// outputs are garbage. Each gate here is a controlled-swap (Fredkin) gate; the
// published circuit calls them R gates but the R gate's equations do not
// select, so the gate type is this design's choice. Purely combinational.
module mux4to1 (
  input  logic s0,
  input  logic s1,
  input  logic i0,
  input  logic i1,
  input  logic i2,
  input  logic i3,
  output logic z
);
  logic s0_pass, m01, m23;
  logic g1, g2, g3, g4, g5;

  fredkin_gate u_lo (.a(s0),      .b(i0),  .c(i1),  .p(s0_pass), .q(m01), .r(g1));
  fredkin_gate u_hi (.a(s0_pass), .b(i2),  .c(i3),  .p(g2),      .q(m23), .r(g3));
  fredkin_gate u_out(.a(s1),      .b(m01), .c(m23), .p(g4),      .q(z),   .r(g5));
endmodule
