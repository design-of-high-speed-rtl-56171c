// vedic_mul_tb: checks the recursive Vedic multiplier at 4, 8, 16 and the
// default 32 bits against integer multiplication.
//   4x4 and 8x8 : every operand pair
//   16x16       : corners and random pairs
//   32x32       : corners, the operands 252 x 846 = 213192 and random pairs
// The design is combinational; one clock period is allowed per vector.
module vedic_mul_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic [7:0]  p4;
  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [15:0] a16, b16; logic [31:0] p16;
  logic [31:0] a32, b32; logic [63:0] p32;

  vedic_mul #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mul #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mul #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  vedic_mul           dut32 (.a(a32), .b(b32), .p(p32));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint unsigned got, input longint unsigned exp,
                       input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic step32(input logic [31:0] x, input logic [31:0] y);
    a32 = x;
    b32 = y;
    a16 = x[15:0];
    b16 = y[15:0];
    @(posedge clk);
    check(p32, longint'(x) * longint'(y), $sformatf("32: %0d x %0d", x, y));
    check(p16, longint'(x[15:0]) * longint'(y[15:0]),
          $sformatf("16: %0d x %0d", x[15:0], y[15:0]));
  endtask

  initial begin
    a4 = '0; b4 = '0; a8 = '0; b8 = '0; a16 = '0; b16 = '0; a32 = '0; b32 = '0;

    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        check(p4, i * j, $sformatf("4: %0d x %0d", i, j));
      end

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        check(p8, i * j, $sformatf("8: %0d x %0d", i, j));
      end

    step32(32'd252, 32'd846);
    check(p32, 64'd213192, "252 x 846");
    step32('0, '0);
    step32('1, '1);
    step32('1, 32'd1);
    step32(32'h8000_0000, 32'h8000_0000);
    step32(32'hFFFF_0000, 32'h0000_FFFF);
    step32(32'h0001_0000, 32'hFFFF_FFFF);
    step32(32'h1234_5678, 32'h9ABC_DEF0);
    for (int k = 0; k < 20000; k++) step32($urandom, $urandom);
    // Operands with long runs of ones stress every carry in the merge adders.
    for (int k = 0; k < 2000; k++)
      step32($urandom | 32'hFFF0_FFF0, $urandom | 32'h0FFF_0FFF);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : vedic_mul_tb
