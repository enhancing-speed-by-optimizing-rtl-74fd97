// tsg_csa: carry-skip adder built on a chain of TSG full adders.
//
// The sum comes from the same TSG ripple chain as tsg_rca. The Q output of each
// TSG (with C = 0) is the propagate bit x[i] ^ y[i]; when all of them are 1 the
// block's carry out equals its carry in, so
//   cout = ripple_carry_out | (&propagate & cin)
// lets the carry bypass the chain. The block organisation (one skip group over
// the four bits, propagate bits, a group-propagate and the final merge) follows
// the published carry-skip figure; taking the propagate bits from the TSG Q
// outputs instead of separate XOR gates is this design's choice. Purely
// combinational.
module tsg_csa #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic             ripple_cout;
  logic [WIDTH-1:0] prop;
  logic [WIDTH-1:0] unused_p;
  logic             group_prop;

  tsg_rca #(.WIDTH(WIDTH)) u_chain (
    .x(x), .y(y), .cin(cin), .sum(sum), .cout(ripple_cout),
    .g_p(unused_p), .g_q(prop)
  );

  assign group_prop = &prop;
  assign cout       = ripple_cout | (group_prop & cin);
endmodule
