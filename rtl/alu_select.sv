// alu_select: the ALU's selecting function. It routes the result of one
// functional unit to the ALU output according to the 3-bit select.
//
//   sel = OP_AND : r_and, zero-extended
//   sel = OP_OR  : r_or,  zero-extended
//   sel = OP_ADD : r_arith ({carry, sum}), zero-extended
//   sel = OP_SUB : r_arith ({carry, difference}), zero-extended
// Add and subtract share one adder, so one arithmetic input serves both; the
// adder is told which to do outside this block.
//   sel = OP_MUL : r_mul, the full 2W-bit product
//   other codes  : 0, with valid_op low
// The output is 2W bits wide so that the product is never truncated. The
// select width comes from the design; the codes (alu_pkg) and the handling of
// unused codes are this implementation's choice. Combinational.
module alu_select
  import alu_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [2:0]     sel,
  input  logic [W-1:0]   r_and,
  input  logic [W-1:0]   r_or,
  input  logic [W:0]     r_arith,
  input  logic [2*W-1:0] r_mul,
  output logic [2*W-1:0] result,
  output logic           valid_op
);

  always_comb begin
    result   = '0;
    valid_op = 1'b1;
    case (sel)
      OP_AND:  result = {{W{1'b0}}, r_and};
      OP_OR:   result = {{W{1'b0}}, r_or};
      OP_ADD,
      OP_SUB:  result = {{(W - 1){1'b0}}, r_arith};
      OP_MUL:  result = r_mul;
      default: valid_op = 1'b0;
    endcase
  end

endmodule : alu_select
