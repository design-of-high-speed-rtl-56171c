// alu_select_tb: drives distinct random values on every result input and
// checks that each select code routes the right one (zero-extended) and that
// the three unused codes give zero with valid_op low.
module alu_select_tb;
  import alu_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2:0]  sel;
  logic [31:0] r_and, r_or;
  logic [32:0] r_arith;
  logic [63:0] r_mul, result;
  logic        valid_op;

  alu_select dut (
    .sel(sel), .r_and(r_and), .r_or(r_or), .r_arith(r_arith), .r_mul(r_mul),
    .result(result), .valid_op(valid_op)
  );

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp;
    logic        exp_v;
    for (int k = 0; k < 2000; k++) begin
      r_and   = $urandom;
      r_or    = $urandom;
      r_arith = {1'($urandom), 32'($urandom)};
      r_mul   = {32'($urandom), 32'($urandom)};
      sel     = 3'(k % 8);
      @(posedge clk);
      exp_v = 1'b1;
      case (k % 8)
        0:       exp = 64'(r_and);
        1:       exp = 64'(r_or);
        2, 3:    exp = 64'(r_arith);
        4:       exp = r_mul;
        default: begin exp = 64'd0; exp_v = 1'b0; end
      endcase
      checks++;
      if (result != exp || valid_op != exp_v) begin
        failures++;
        if (failures < 20)
          $display("FAIL sel=%0d -> %h v=%b (exp %h v=%b)", sel, result, valid_op, exp, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : alu_select_tb
