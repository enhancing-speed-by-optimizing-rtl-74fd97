// addsub4: 4-bit adder/subtractor made only of TSG gates.
//
// Mode input a: 0 adds, 1 subtracts.
//   a = 0:  {cout, s0} = x + y + cin
//   a = 1:  {cout, s0} = x + ~y + ~cin = x - y - cin (+16)
// When subtracting, cin is a borrow in and cout is 1 when no borrow is needed
// (x >= y + cin), the usual two's-complement convention.
// Each y bit, and cin, is XORed with a by a TSG used as an XOR (C = D = 0,
// Q = A ^ B), then a chain of TSG full adders adds. USE_CARRY_SKIP = 1 swaps
// the ripple chain for the carry-skip adder; the default is the ripple chain.
// Ports follow the published block symbol (x, y, a, cin, s0, cout); the
// published design names the mode input but not the convention for cin and
// cout when subtracting, so those are this design's choice.
// Purely combinational.
module addsub4 #(
  parameter int unsigned WIDTH          = 4,
  parameter bit          USE_CARRY_SKIP = 1'b0
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             a,
  input  logic             cin,
  output logic [WIDTH-1:0] s0,
  output logic             cout
);
  logic [WIDTH-1:0] y_eff;
  logic [WIDTH-1:0] unused_p, unused_r, unused_s;
  logic             cin_eff;
  logic             unused_cp, unused_cr, unused_cs;

  // Conditional inversion of the B operand: TSG as an XOR gate.
  for (genvar i = 0; i < WIDTH; i++) begin : g_inv
    tsg_gate u_xor (
      .a(a), .b(y[i]), .c(1'b0), .d(1'b0),
      .p(unused_p[i]), .q(y_eff[i]), .r(unused_r[i]), .s(unused_s[i])
    );
  end

  tsg_gate u_cxor (
    .a(a), .b(cin), .c(1'b0), .d(1'b0),
    .p(unused_cp), .q(cin_eff), .r(unused_cr), .s(unused_cs)
  );

  if (USE_CARRY_SKIP) begin : g_csa
    tsg_csa #(.WIDTH(WIDTH)) u_add (
      .x(x), .y(y_eff), .cin(cin_eff), .sum(s0), .cout(cout)
    );
  end else begin : g_rca
    logic [WIDTH-1:0] unused_gp, unused_gq;
    tsg_rca #(.WIDTH(WIDTH)) u_add (
      .x(x), .y(y_eff), .cin(cin_eff), .sum(s0), .cout(cout),
      .g_p(unused_gp), .g_q(unused_gq)
    );
  end
endmodule
