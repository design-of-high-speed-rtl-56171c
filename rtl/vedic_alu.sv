// vedic_alu: combinational ALU whose multiplier uses Vedic
// (Urdhva-Tiryagbhyam) multiplication, with a two-digit seven-segment
// readout.
//
// Operands a and b (W bits) go to every functional unit at once:
//   logic_unit   AND and OR
//   addsub_unit  ADD and SUB on one adder (SUB = a + ~b + 1)
//   vedic_mul    W x W -> 2W product from a tree of 2x2 Vedic cells
// alu_select picks one result by sel (codes in alu_pkg); result is 2W bits.
// Two seg7_decoder instances show the two low hexadecimal digits of the
// result: Display1 (seg_lsd) bits 3:0, Display2 (seg_msd) bits 7:4. The
// decimal point of the least significant digit, dp_lsd, lights when the
// result has nonzero bits above bit 7, i.e. the two digits do not show all
// of it.
//
// The set of units, the shared adder for subtraction, the Vedic multiplier,
// the select input and the two displays with a decimal point follow the
// design. The operation codes, what the displays show and the meaning of the
// decimal point are this implementation's choices. There is no clock: every
// output is valid one propagation delay after the inputs change.
module vedic_alu
  import alu_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [2:0]     sel,
  output logic [2*W-1:0] result,
  output logic           valid_op,
  output logic [6:0]     seg_lsd,
  output logic [6:0]     seg_msd,
  output logic           dp_lsd
);

  logic [W-1:0]   r_and, r_or;
  logic [W-1:0]   arith_res;
  logic           arith_c;
  logic [2*W-1:0] r_mul;

  logic_unit #(.W(W)) u_logic (.a(a), .b(b), .y_and(r_and), .y_or(r_or));

  // The single adder subtracts when SUB is selected.
  addsub_unit #(.W(W)) u_arith (
    .a(a), .b(b), .sub(sel == OP_SUB), .res(arith_res), .cout(arith_c)
  );

  vedic_mul #(.N(W)) u_mul (.a(a), .b(b), .p(r_mul));

  alu_select #(.W(W)) u_select (
    .sel     (sel),
    .r_and   (r_and),
    .r_or    (r_or),
    .r_arith ({arith_c, arith_res}),
    .r_mul   (r_mul),
    .result  (result),
    .valid_op(valid_op)
  );

  seg7_decoder u_display1 (.digit(result[3:0]), .seg(seg_lsd));
  seg7_decoder u_display2 (.digit(result[7:4]), .seg(seg_msd));

  assign dp_lsd = |result[2*W-1:8];

endmodule : vedic_alu
