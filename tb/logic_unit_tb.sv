// logic_unit_tb: checks AND and OR bit by bit against a per-bit truth table.
module logic_unit_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] a, b, y_and, y_or;

  logic_unit dut (.a(a), .b(b), .y_and(y_and), .y_or(y_or));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] ea, eo;
    a = x; b = y;
    @(posedge clk);
    for (int i = 0; i < 32; i++) begin
      ea[i] = (x[i] == 1'b1 && y[i] == 1'b1);
      eo[i] = (x[i] == 1'b1 || y[i] == 1'b1);
    end
    checks++;
    if (y_and != ea || y_or != eo) begin
      failures++;
      if (failures < 20) $display("FAIL %h %h -> and %h or %h", x, y, y_and, y_or);
    end
  endtask

  initial begin
    step('0, '0);
    step('1, '0);
    step('1, '1);
    step(32'hA5A5_A5A5, 32'h0FF0_0FF0);
    for (int k = 0; k < 3000; k++) step($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : logic_unit_tb
