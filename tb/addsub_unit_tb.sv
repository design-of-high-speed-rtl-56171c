// addsub_unit_tb: checks addition and subtraction of the shared-adder unit at
// 32 bits. Expected values come from 64-bit integer arithmetic: for addition
// {cout, res} = a + b; for subtraction res = (a - b) mod 2^32 and cout = 1
// exactly when a >= b.
module addsub_unit_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_borrow = 0, n_carry = 0;

  logic [31:0] a, b, res;
  logic        sub, cout;

  addsub_unit dut (.a(a), .b(b), .sub(sub), .res(res), .cout(cout));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [31:0] x, input logic [31:0] y, input logic s);
    longint unsigned sum;
    logic [31:0]     exp_res;
    logic            exp_c;
    a = x; b = y; sub = s;
    @(posedge clk);
    if (s) begin
      exp_res = 32'(longint'(x) - longint'(y));
      exp_c   = (x >= y);
      if (!exp_c) n_borrow++;
    end else begin
      sum     = longint'(x) + longint'(y);
      exp_res = sum[31:0];
      exp_c   = sum[32];
      if (exp_c) n_carry++;
    end
    checks++;
    if (res != exp_res || cout != exp_c) begin
      failures++;
      if (failures < 20)
        $display("FAIL %h %s %h -> c=%b %h (exp c=%b %h)", x, s ? "-" : "+", y,
                 cout, res, exp_c, exp_res);
    end
  endtask

  initial begin
    step(32'd5, 32'd3, 1'b1);
    step(32'd3, 32'd5, 1'b1);
    step(32'd7, 32'd7, 1'b1);
    step('0, 32'd1, 1'b1);
    step('1, 32'd1, 1'b0);
    step(32'd252, 32'd846, 1'b0);
    step(32'd846, 32'd252, 1'b1);
    for (int k = 0; k < 5000; k++) step($urandom, $urandom, 1'($urandom));
    checks++;
    if (n_borrow == 0 || n_carry == 0) begin
      failures++;
      $display("FAIL carry (%0d) or borrow (%0d) never exercised", n_carry, n_borrow);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : addsub_unit_tb
