// half_adder: one-bit half adder, the cell of the 2x2 Vedic multiplier.
//
// s = a xor b, c = a and b. Purely combinational. The gate pair is the
// textbook half adder; the design only names the cell.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  assign s = a ^ b;
  assign c = a & b;

endmodule : half_adder
