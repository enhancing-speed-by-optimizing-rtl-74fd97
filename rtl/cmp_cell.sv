// cmp_cell: one-bit reversible comparator cell.
//
// For bits a and b it gives three one-hot flags:
//   eq = (a ^ b)'   gt = a b'   lt = a' b
// Structure, as in the published cell: a Feynman gate with A = 1 inverts b;
// an R gate fed with b', a and 1 gives a XNOR b and a b' (its middle output is
// garbage); a BJN gate fed with those two and 1 passes them on and gives
// NOR(a XNOR b, a b') = a' b. Five garbage or constant lines; purely
// combinational.
module cmp_cell (
  input  logic a,
  input  logic b,
  output logic eq,
  output logic gt,
  output logic lt
);
  logic one_pass, b_n;
  logic xnor_ab, a_nb, g_r;

  feynman_gate u_fg  (.a(1'b1),     .b(b),    .p(one_pass), .q(b_n));
  r_gate       u_rg  (.a(b_n),      .b(a),    .c(one_pass), .p(xnor_ab), .q(g_r), .r(a_nb));
  bjn_gate     u_bjn (.a(xnor_ab),  .b(a_nb), .c(1'b1),     .p(eq), .q(gt), .r(lt));
endmodule
