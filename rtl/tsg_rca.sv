// tsg_rca: ripple-carry adder made of TSG full adders.
//
// Bit i is one TSG gate with A = x[i], B = y[i], C = 0 and D = the carry from
// bit i-1; its R output is sum bit i and its S output the carry into bit i+1.
// P and Q of each gate are garbage outputs and are brought out as g_p and g_q
// so that the reversible gate count stays visible. Four bits is the published
// size; WIDTH is a parameter so the same chain serves the wider adders of the
// signed multiplier. Purely combinational: the carry ripples through WIDTH
// gates.
module tsg_rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [WIDTH-1:0] g_p,   // garbage: copy of x
  output logic [WIDTH-1:0] g_q    // garbage: x ^ y (the propagate signal)
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    tsg_gate u_fa (
      .a(x[i]), .b(y[i]), .c(1'b0), .d(carry[i]),
      .p(g_p[i]), .q(g_q[i]), .r(sum[i]), .s(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
