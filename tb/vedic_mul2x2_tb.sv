// vedic_mul2x2_tb: all 16 operand pairs of the 2x2 Vedic cell, compared with
// integer multiplication.
module vedic_mul2x2_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] p;

  vedic_mul2x2 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        @(posedge clk);
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d x %0d -> %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : vedic_mul2x2_tb
