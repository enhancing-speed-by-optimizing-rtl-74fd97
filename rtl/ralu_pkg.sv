// ralu_pkg: constants and types shared by the 4-bit reversible ALU.
//
// The ALU works on 4-bit operands. The two operation-select inputs s2 (high)
// and s1 (low) choose which unit drives the result bus. The published design
// selects with two lines but does not print the code table, so the
// order below is this design's own choice.
package ralu_pkg;

  // Operand width of the ALU.
  localparam int unsigned ALU_WIDTH = 4;

  // Result-bus select, {s2, s1}.
  typedef enum logic [1:0] {
    OP_ADDSUB = 2'b00,  // adder/subtractor sum (a1 = 0 add, a1 = 1 subtract)
    OP_MUX    = 2'b01,  // 2:1 word multiplexer: q1 when a1 = 0, q2 when a1 = 1
    OP_CMP    = 2'b10,  // comparator word: the smaller operand
    OP_MUL    = 2'b11   // low nibble of the 4x4 product
  } alu_op_e;

endpackage
