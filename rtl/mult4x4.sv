// mult4x4: 4x4 unsigned reversible array multiplier (TSG and Fredkin gates).
//
// y1 = x1 * x2, an 8-bit product.
// Partial products: the 16 terms x1[i] & x2[j] each come from a Fredkin gate
// with its third input tied to 0 (R = A & B).
// Multi-operand addition, as in the published 4x4 circuit, uses three 4-bit
// TSG ripple adders and one extra TSG:
//   right adder  column 1..4:  {x1y3, x0y3, x0y2, x0y1} + {0, x3y0, x2y0, x1y0}
//   left adder   column 2..5:  {x2y3, x3y1, x1y2, x1y1} + {x3y2, x2y2, x2y1, 0}
//   bottom adder column 2..5:  {right carry, right sum[3:1]} + left sum
//   last TSG     column 6:     x3y3 + left carry + bottom carry -> y1[6], y1[7]
// y1[0] = x0y0 and y1[1] = right sum[0]. (xiyj is x1[i] & x2[j].)
// This structure has 34 constant inputs and 58 garbage outputs, the counts the
// published comparison table gives for its TSG/Fredkin multiplier. Using
// Fredkin gates for the partial products is inferred from those counts.
// The published block symbol prints the output as y1<3:0>, but its worked
// example (1010 x 0010 = 00010100) and the circuit's P0..P7 outputs give eight
// bits, so the product is 8 bits wide. Purely combinational.
module mult4x4 (
  input  logic [3:0] x1,
  input  logic [3:0] x2,
  output logic [7:0] y1
);
  logic [3:0] pp [4];        // pp[i][j] = x1[i] & x2[j]
  logic [3:0] gp [4];        // Fredkin garbage
  logic [3:0] gq [4];

  for (genvar i = 0; i < 4; i++) begin : g_row
    for (genvar j = 0; j < 4; j++) begin : g_col
      fredkin_gate u_and (
        .a(x1[i]), .b(x2[j]), .c(1'b0),
        .p(gp[i][j]), .q(gq[i][j]), .r(pp[i][j])
      );
    end
  end

  logic [3:0] r_sum, l_sum, b_sum;
  logic       r_cout, l_cout, b_cout;
  logic [3:0] unused_rp, unused_rq, unused_lp, unused_lq, unused_bp, unused_bq;
  logic       unused_fp, unused_fq;

  tsg_rca #(.WIDTH(4)) u_right (
    .x({pp[1][3], pp[0][3], pp[0][2], pp[0][1]}),
    .y({1'b0,     pp[3][0], pp[2][0], pp[1][0]}),
    .cin(1'b0), .sum(r_sum), .cout(r_cout), .g_p(unused_rp), .g_q(unused_rq)
  );

  tsg_rca #(.WIDTH(4)) u_left (
    .x({pp[2][3], pp[3][1], pp[1][2], pp[1][1]}),
    .y({pp[3][2], pp[2][2], pp[2][1], 1'b0}),
    .cin(1'b0), .sum(l_sum), .cout(l_cout), .g_p(unused_lp), .g_q(unused_lq)
  );

  tsg_rca #(.WIDTH(4)) u_bottom (
    .x({r_cout, r_sum[3:1]}),
    .y(l_sum),
    .cin(1'b0), .sum(b_sum), .cout(b_cout), .g_p(unused_bp), .g_q(unused_bq)
  );

  tsg_gate u_last (
    .a(pp[3][3]), .b(l_cout), .c(1'b0), .d(b_cout),
    .p(unused_fp), .q(unused_fq), .r(y1[6]), .s(y1[7])
  );

  assign y1[0]   = pp[0][0];
  assign y1[1]   = r_sum[0];
  assign y1[5:2] = b_sum;
endmodule
