// addsub_unit: W-bit adder/subtractor on a single adder.
//
// Subtraction A - B is done as A + ~B + 1: with sub = 1 the B input is
// inverted and the carry in is set to one, so no separate subtractor is
// needed (this scheme follows the design). With sub = 0 it computes A + B.
// cout is the adder's carry out: for addition the unsigned overflow bit, for
// subtraction 1 when A >= B (no borrow). Combinational.
module addsub_unit #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] res,
  output logic         cout
);

  logic [W-1:0] b_eff;

  assign b_eff = sub ? ~b : b;

  adder #(.W(W)) u_adder (
    .x   (a),
    .y   (b_eff),
    .cin (sub),
    .sum (res),
    .cout(cout)
  );

endmodule : addsub_unit
