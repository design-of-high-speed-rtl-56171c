// vedic_alu_tb: end-to-end test of the ALU at its default 32-bit width.
//
// For every select code it applies corner and random operands and checks the
// 64-bit result, valid_op, both seven-segment digits and the decimal point
// against values computed here with integer arithmetic. It also applies the
// operands 252 and 846 with MUL (product 213192). It counts how often each
// mechanism occurs (each operation, an add carry out, a subtract borrow, an
// undefined code, the decimal point lit and dark) and fails any that never
// occurs. The ALU is combinational: one clock period is allowed per vector.
module vedic_alu_tb;
  import alu_pkg::*;
  `include "seg7_expect.svh"

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [31:0] a, b;
  logic [2:0]  sel;
  logic [63:0] result;
  logic        valid_op, dp_lsd;
  logic [6:0]  seg_lsd, seg_msd;

  vedic_alu dut (
    .a(a), .b(b), .sel(sel), .result(result), .valid_op(valid_op),
    .seg_lsd(seg_lsd), .seg_msd(seg_msd), .dp_lsd(dp_lsd)
  );

  int n_op[8];
  int n_add_carry = 0, n_sub_borrow = 0, n_dp_on = 0, n_dp_off = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] x, input logic [31:0] y, input logic [2:0] s);
    longint unsigned exp;
    logic [31:0]     diff;
    logic            exp_v;
    a = x; b = y; sel = s;
    @(posedge clk);
    exp_v = 1'b1;
    case (s)
      3'd0: exp = longint'(x & y);
      3'd1: exp = longint'(x | y);
      3'd2: begin
        exp = longint'(x) + longint'(y);
        if (exp[32]) n_add_carry++;
      end
      3'd3: begin
        diff = 32'(longint'(x) - longint'(y));
        exp  = {32'd0, diff};
        if (x >= y) exp[32] = 1'b1;
        else n_sub_borrow++;
      end
      3'd4: exp = longint'(x) * longint'(y);
      default: begin exp = 0; exp_v = 1'b0; end
    endcase
    n_op[s]++;
    if (exp > 255) n_dp_on++; else n_dp_off++;
    checks++;
    if (result != exp || valid_op != exp_v ||
        seg_lsd != seg7_expect(exp[3:0]) || seg_msd != seg7_expect(exp[7:4]) ||
        dp_lsd != (exp > 255)) begin
      failures++;
      if (failures < 20)
        $display("FAIL sel=%0d a=%h b=%h -> %h v=%b seg %b %b dp %b (exp %h)",
                 s, x, y, result, valid_op, seg_msd, seg_lsd, dp_lsd, exp);
    end
  endtask

  initial begin
    apply(32'd252, 32'd846, OP_MUL);
    checks++;
    if (result != 64'd213192) begin
      failures++;
      $display("FAIL 252 x 846 = %0d", result);
    end
    for (int s = 0; s < 8; s++) begin
      apply('0, '0, 3'(s));
      apply('1, '1, 3'(s));
      apply(32'd9, 32'd6, 3'(s));
      apply(32'd6, 32'd9, 3'(s));
      apply(32'h0000_000F, 32'h0000_0011, 3'(s));
      for (int k = 0; k < 3000; k++) apply($urandom, $urandom, 3'(s));
      for (int k = 0; k < 300; k++) apply($urandom % 32, $urandom % 32, 3'(s));
    end
    for (int k = 0; k < 5000; k++) apply($urandom, $urandom, 3'($urandom));

    for (int s = 0; s < 8; s++) begin
      $display("sel %0d applied %0d times", s, n_op[s]);
      checks++;
      if (n_op[s] == 0) failures++;
    end
    $display("add carry out %0d, subtract borrow %0d, dp lit %0d, dp dark %0d",
             n_add_carry, n_sub_borrow, n_dp_on, n_dp_off);
    checks++;
    if (n_add_carry == 0 || n_sub_borrow == 0 || n_dp_on == 0 || n_dp_off == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : vedic_alu_tb
