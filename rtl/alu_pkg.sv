// alu_pkg: operation codes shared by the Vedic ALU, its result selector and
// their testbenches.
//
// The ALU takes a 3-bit select (SEL). The five operations are the four units
// of the block diagram (AND, OR, ADD, MUL) plus subtraction, which shares the
// adder. The numeric code of each operation is this design's own choice; the
// three remaining codes are undefined and give a zero result.
package alu_pkg;

  typedef enum logic [2:0] {
    OP_AND = 3'd0,
    OP_OR  = 3'd1,
    OP_ADD = 3'd2,
    OP_SUB = 3'd3,
    OP_MUL = 3'd4
  } alu_op_e;

endpackage : alu_pkg
