// adder_tb: checks the adder at 4 bits (every x, y and carry in) and at the
// default 32 bits (corners and random values) against 64-bit integer sums.
module adder_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]  x4, y4, s4;   logic cin4, co4;
  logic [31:0] x32, y32, s32; logic cin32, co32;

  adder #(.W(4)) dut4  (.x(x4),  .y(y4),  .cin(cin4),  .sum(s4),  .cout(co4));
  adder          dut32 (.x(x32), .y(y32), .cin(cin32), .sum(s32), .cout(co32));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step32(input logic [31:0] x, input logic [31:0] y, input logic c);
    longint unsigned exp;
    x32 = x; y32 = y; cin32 = c;
    @(posedge clk);
    exp = longint'(x) + longint'(y) + longint'(c);
    checks++;
    if ({co32, s32} != exp[32:0]) begin
      failures++;
      if (failures < 20) $display("FAIL %h + %h + %b -> %b %h", x, y, c, co32, s32);
    end
  endtask

  initial begin
    x32 = '0; y32 = '0; cin32 = 1'b0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          x4 = 4'(i); y4 = 4'(j); cin4 = 1'(c);
          #1;
          checks++;
          if (int'({co4, s4}) != i + j + c) begin
            failures++;
            $display("FAIL 4-bit %0d + %0d + %0d -> %0d", i, j, c, {co4, s4});
          end
        end
    step32('1, '0, 1'b1);
    step32('1, '1, 1'b1);
    step32(32'h7FFF_FFFF, 32'd1, 1'b0);
    step32('0, '0, 1'b0);
    for (int k = 0; k < 5000; k++) step32($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : adder_tb
