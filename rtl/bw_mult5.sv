// bw_mult5: N x N signed (two's-complement) multiplier, Baugh-Wooley style,
// built from reversible gates. Default N = 5, the size of the published
// signed-multiplier algorithm.
//
// z = x * y, 2N bits, all signed.
// Partial-product matrix (t = x[i] & x[j] from a Fredkin gate with C = 0):
//   x[i]y[j]            for i, j < N-1
//   NOT(x[N-1]y[j])     for j < N-1   (inverted by a Feynman gate with A = 1)
//   NOT(x[i]y[N-1])     for i < N-1
//   x[N-1]y[N-1]
// plus a constant 1 in column N and in column 2N-1; the sum is taken modulo
// 2^(2N). Row j of the matrix is accumulated into a running sum by a 2N-bit
// TSG ripple adder, and a last adder adds the constant ones. The matrix follows
// the published 5x5 algorithm. That algorithm shows only the constant in column
// 2N-1, but the product is only correct with both constants, so both are
// added. Summing row by row, rather than by a column-wise adder tree, is this
// design's choice. Purely combinational.
module bw_mult5 #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z
);
  localparam int unsigned W = 2 * N;

  logic [N-1:0] t   [N];     // t[j][i] = x[i] & y[j]
  logic [N-1:0] tb  [N];     // t, inverted where Baugh-Wooley needs it
  logic [N-1:0] gp  [N];
  logic [N-1:0] gq  [N];
  logic [N-1:0] gf  [N];
  logic [W-1:0] row [N];

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      fredkin_gate u_and (
        .a(x[i]), .b(y[j]), .c(1'b0), .p(gp[j][i]), .q(gq[j][i]), .r(t[j][i])
      );
      // Invert when exactly one of the two operand bits is a sign bit.
      localparam bit INV = (i == N - 1) != (j == N - 1);
      feynman_gate u_inv (
        .a(INV), .b(t[j][i]), .p(gf[j][i]), .q(tb[j][i])
      );
    end
    assign row[j] = W'(tb[j]) << j;
  end

  localparam logic [W-1:0] CONST_ONES = (W'(1) << N) | (W'(1) << (W - 1));

  logic [W-1:0] acc   [N+1];
  logic [W-1:0] gap   [N];
  logic [W-1:0] gaq   [N];
  logic         carry [N];   // dropped: the sum is modulo 2^(2N)

  assign acc[0] = row[0];
  for (genvar k = 1; k <= N; k++) begin : g_acc
    tsg_rca #(.WIDTH(W)) u_add (
      .x(acc[k-1]), .y((k < N) ? row[k % N] : CONST_ONES), .cin(1'b0),
      .sum(acc[k]), .cout(carry[k-1]), .g_p(gap[k-1]), .g_q(gaq[k-1])
    );
  end

  assign z = acc[N];
endmodule
