// seg7_decoder_tb: all sixteen digits, compared with patterns built from the
// list of segments each hexadecimal digit lights.
module seg7_decoder_tb;
  `include "seg7_expect.svh"

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] digit;
  logic [6:0] seg;

  seg7_decoder dut (.digit(digit), .seg(seg));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      digit = 4'(i);
      @(posedge clk);
      checks++;
      if (seg != seg7_expect(digit)) begin
        failures++;
        $display("FAIL digit %h -> %b (exp %b)", digit, seg, seg7_expect(digit));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : seg7_decoder_tb
