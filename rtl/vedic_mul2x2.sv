// vedic_mul2x2: 2x2-bit Urdhva-Tiryagbhyam ("vertically and crosswise")
// multiplier, the leaf of the Vedic multiplier tree.
//
// Four AND gates form the bit products a0b0, a1b0, a0b1 and a1b1.
//   vertical   : s0 = a0b0 is the product's least significant bit;
//   crosswise  : a half adder sums a0b1 and a1b0, giving s1 and carry c1;
//   vertical   : a second half adder sums a1b1 and c1, giving s2 and c2.
// The product is {c2, s2, s1, s0}. This structure follows the design; the
// delay after the bit products is two half adders. Combinational.
module vedic_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic a0b0, a1b0, a0b1, a1b1;
  logic s1, c1, s2, c2;

  assign a0b0 = a[0] & b[0];
  assign a1b0 = a[1] & b[0];
  assign a0b1 = a[0] & b[1];
  assign a1b1 = a[1] & b[1];

  half_adder u_ha_cross (.a(a0b1), .b(a1b0), .s(s1), .c(c1));
  half_adder u_ha_high  (.a(a1b1), .b(c1),   .s(s2), .c(c2));

  assign p = {c2, s2, s1, a0b0};

endmodule : vedic_mul2x2
