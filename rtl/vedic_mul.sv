// vedic_mul: NxN unsigned multiplier built by the Urdhva-Tiryagbhyam
// ("vertically and crosswise") method from 2x2 Vedic cells.
//
// The operands are cut into digits. Level 1 multiplies every 2-bit digit of
// a by every 2-bit digit of b in a 2x2 Vedic cell (vedic_mul2x2), all in
// parallel. Each following level doubles the digit width: the product of a
// 2S-bit digit pair is merged (vedic_merge) from the four S-bit products of
// its halves, the two vertical and the two crosswise ones. Level log2(N)
// holds one product, the result. For N = 32 that is 256 2x2 cells, then 64
// 4x4, 16 8x8, 4 16x16 and 1 32x32 merge, the same tree as 4x4 built from
// four 2x2, 8x8 from four 4x4 and so on. Building wider multipliers from the
// 2x2 cell follows the design; the merge adders are this implementation's
// choice.
//
// Products are indexed prod[i*D + j] = (digit i of a) * (digit j of b),
// where D = N/S is the number of S-bit digits per operand at that level.
//
// N must be a power of two, at least 2. Combinational: p is valid one
// propagation delay after a and b.
module vedic_mul #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned LEVELS = $clog2(N);

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("vedic_mul: N must be a power of two, at least 2");
  end

  for (genvar lv = 1; lv <= LEVELS; lv++) begin : g_lvl
    localparam int unsigned S = 1 << lv;  // digit width at this level
    localparam int unsigned D = N / S;    // digits per operand

    logic [2*S-1:0] prod [D*D];

    if (lv == 1) begin : g_cells
      for (genvar i = 0; i < D; i++) begin : g_i
        for (genvar j = 0; j < D; j++) begin : g_j
          vedic_mul2x2 u_cell (
            .a(a[2*i +: 2]), .b(b[2*j +: 2]), .p(prod[i*D + j])
          );
        end
      end
    end else begin : g_merges
      localparam int unsigned DP = 2 * D;  // digits per operand one level down
      for (genvar i = 0; i < D; i++) begin : g_i
        for (genvar j = 0; j < D; j++) begin : g_j
          vedic_merge #(.H(S / 2)) u_merge (
            .q0(g_lvl[lv-1].prod[(2*i)   * DP + 2*j]),
            .q1(g_lvl[lv-1].prod[(2*i+1) * DP + 2*j]),
            .q2(g_lvl[lv-1].prod[(2*i)   * DP + 2*j + 1]),
            .q3(g_lvl[lv-1].prod[(2*i+1) * DP + 2*j + 1]),
            .p (prod[i*D + j])
          );
        end
      end
    end
  end

  assign p = g_lvl[LEVELS].prod[0];

endmodule : vedic_mul
