// tb_ser2_unit: feeds random bit pairs (a, b), one pair per clk_slow period, changing
// just after the clk_slow rising edge, with clk_fast at twice the rate (clk_slow made
// from clk_fast by a toggle register, so the edges line up as in the design). Checks
// that q shows a from the next falling edge of clk_slow and b from the rising edge
// after it, for 300 periods.
module tb_ser2_unit;
  timeunit 1ps;
  timeprecision 1ps;
  logic clk_fast = 0, clk_slow = 0, a = 0, b = 0, q;
  logic a_k, b_k;
  int checks = 0, failures = 0;
  ser2_unit dut (.clk_fast(clk_fast), .clk_slow(clk_slow), .a(a), .b(b), .q(q));
  always #100 clk_fast = ~clk_fast;
  always @(posedge clk_fast) clk_slow <= ~clk_slow;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (4) @(posedge clk_slow);
    repeat (300) begin
      #20 a = logic'($urandom % 2);
      b = logic'($urandom % 2);
      a_k = a;
      b_k = b;
      @(negedge clk_slow);
      #100 check(q == a_k, "first bit");
      @(posedge clk_slow);
      #100 check(q == b_k, "second bit");

    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
