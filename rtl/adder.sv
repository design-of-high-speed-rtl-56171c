// adder: W-bit binary adder with carry in and carry out.
//
// {cout, sum} = x + y + cin. It is the ALU's ADD unit (subtraction uses it
// with B inverted and cin = 1) and the adder that combines partial products
// inside the Vedic multiplier. The adder architecture is left to synthesis;
// the design does not fix one. Combinational.
module adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  assign {cout, sum} = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, cin};

endmodule : adder
