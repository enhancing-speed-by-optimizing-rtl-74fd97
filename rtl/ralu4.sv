// ralu4: 4-bit reversible arithmetic logic unit.
//
// Four units work in parallel on the operands q1 and q2:
//   addsub4     q1 + q2 + cin1 (a1 = 0) or q1 - q2 - cin1 (a1 = 1); cout1
//   mux2_word   q1 (a1 = 0) or q2 (a1 = 1)
//   comparator4 the smaller operand, plus the flags cmp_eq, cmp_gt, cmp_lt
//   mult4x4     the 8-bit product q1 * q2
// One mux4to1 per result bit, selected by s1 (its S0) and s2 (its S1), drives
// q3 with the adder/subtractor, multiplexer, comparator or product
// (low nibble) result; see ralu_pkg::alu_op_e. The product's high nibble is
// always available on q3_hi.
// Units, the ports q1, q2, a1, cin1, s1, s2, q3, cout1, the mode line a1
// shared by the adder/subtractor and the 2:1 multiplexer, and the per-bit 4:1
// output multiplexers follow the published ALU. The order of the four results
// on the select lines, and the extra outputs q3_hi and cmp_*, are this
// design's choices.
//
// Beside the ALU stands the signed 5x5 Baugh-Wooley multiplier (bw_mult5),
// with its own ports sx, sy, sz. It is not connected to the ALU.
//
// Everything is combinational; no clock or reset.
module ralu4
  import ralu_pkg::*;
(
  input  logic [ALU_WIDTH-1:0] q1,
  input  logic [ALU_WIDTH-1:0] q2,
  input  logic                 a1,
  input  logic                 cin1,
  input  logic                 s1,
  input  logic                 s2,
  output logic [ALU_WIDTH-1:0] q3,
  output logic                 cout1,
  output logic [ALU_WIDTH-1:0] q3_hi,
  output logic                 cmp_eq,
  output logic                 cmp_gt,
  output logic                 cmp_lt,
  // Signed 5x5 multiplier, independent of the ALU.
  input  logic [4:0]           sx,
  input  logic [4:0]           sy,
  output logic [9:0]           sz
);
  logic [ALU_WIDTH-1:0]   sum, mux_w, cmp_c;
  logic [2*ALU_WIDTH-1:0] prod;
  logic [ALU_WIDTH-1:0]   unused_beq, unused_bgt, unused_blt;

  addsub4 #(.WIDTH(ALU_WIDTH)) u_addsub (
    .x(q1), .y(q2), .a(a1), .cin(cin1), .s0(sum), .cout(cout1)
  );

  mux2_word #(.WIDTH(ALU_WIDTH)) u_mux (
    .w1(q1), .w2(q2), .ss1(a1), .w3(mux_w)
  );

  comparator4 #(.WIDTH(ALU_WIDTH)) u_cmp (
    .a(q1), .b(q2), .c(cmp_c), .eq(cmp_eq), .gt(cmp_gt), .lt(cmp_lt),
    .bit_eq(unused_beq), .bit_gt(unused_bgt), .bit_lt(unused_blt)
  );

  mult4x4 u_mul (.x1(q1), .x2(q2), .y1(prod));

  // Result bus: one 4:1 multiplexer per bit; the input order matches alu_op_e.
  for (genvar i = 0; i < ALU_WIDTH; i++) begin : g_out
    mux4to1 u_sel (
      .s0(s1), .s1(s2),
      .i0(sum[i]), .i1(mux_w[i]), .i2(cmp_c[i]), .i3(prod[i]),
      .z(q3[i])
    );
  end

  assign q3_hi = prod[2*ALU_WIDTH-1:ALU_WIDTH];

  bw_mult5 #(.N(5)) u_smul (.x(sx), .y(sy), .z(sz));
endmodule
