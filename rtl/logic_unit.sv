// logic_unit: the ALU's logical module, bitwise AND and OR of two operands.
//
// Both results are produced at once; the result selector picks one. The
// design names the AND and OR units; it gives no other logical operation.
// Combinational.
module logic_unit #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y_and,
  output logic [W-1:0] y_or
);

  assign y_and = a & b;
  assign y_or  = a | b;

endmodule : logic_unit
