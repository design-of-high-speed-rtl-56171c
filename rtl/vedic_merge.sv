// vedic_merge: one "vertically and crosswise" merge step of the Vedic
// multiplier. It turns the four H x H sub-products of two 2H-bit operands,
// split as aH:aL and bH:bL, into their 4H-bit product:
//   q0 = aL*bL  (vertical, low)      q1 = aH*bL  (crosswise)
//   q2 = aL*bH  (crosswise)          q3 = aH*bH  (vertical, high)
// using three adders:
//   cross = q1 + q2                  (2H+1 bits)
//   mid   = cross + q0[2H-1:H]       (2H+1 bits)
//   p     = { q3 + mid[2H:H], mid[H-1:0], q0[H-1:0] }
// which equals q0 + (q1 + q2) * 2^H + q3 * 2^(2H). The adder arrangement is
// this implementation's choice; the design only says that wider Vedic
// multipliers are built from narrower ones. H defaults to 16, the last
// merge of the 32x32 multiplier. Combinational.
module vedic_merge #(
  parameter int unsigned H = 16
) (
  input  logic [2*H-1:0] q0,
  input  logic [2*H-1:0] q1,
  input  logic [2*H-1:0] q2,
  input  logic [2*H-1:0] q3,
  output logic [4*H-1:0] p
);

  localparam int unsigned N = 2 * H;

  logic [N-1:0] cross_sum;
  logic         cross_c;
  logic [N:0]   mid;
  logic         mid_c;
  logic [N-1:0] upper;
  logic         upper_c;

  // Crosswise products summed.
  adder #(.W(N)) u_add_cross (
    .x(q1), .y(q2), .cin(1'b0), .sum(cross_sum), .cout(cross_c)
  );

  // Carry the upper half of the low vertical product into the cross sum.
  adder #(.W(N + 1)) u_add_mid (
    .x({cross_c, cross_sum}), .y({{(H + 1){1'b0}}, q0[N-1:H]}), .cin(1'b0),
    .sum(mid), .cout(mid_c)
  );

  // High vertical product plus what overflows the middle column.
  adder #(.W(N)) u_add_high (
    .x(q3), .y({{(H - 1){1'b0}}, mid[N:H]}), .cin(1'b0),
    .sum(upper), .cout(upper_c)
  );

  assign p = {upper, mid[H-1:0], q0[H-1:0]};

  // When the inputs are true sub-products of H-bit digits, the sums fit
  // their widths and both carries are zero; they exist only because the
  // common adder cell has a carry out.
  always_comb begin
    assert (mid_c == 1'b0 && upper_c == 1'b0)
      else $error("vedic_merge: carry out of a merge adder; inputs are not sub-products");
  end

endmodule : vedic_merge
