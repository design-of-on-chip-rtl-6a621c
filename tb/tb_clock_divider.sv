// tb_clock_divider: runs the divider from a 200 ps EXclock and checks that clk2g5,
// clk1g25 and clk625m have periods of 2, 4 and 8 EXclock periods with 50 % duty
// (edge-to-edge times), that clk5g is EXclock, and that on every rising edge of
// clk625m the other two divided clocks rise in the same time step.
module tb_clock_divider;
  timeunit 1ps;
  timeprecision 1ps;
  logic exclock = 0;
  logic clk5g, clk2g5, clk1g25, clk625m;
  int checks = 0, failures = 0;
  longint last [3];
  longint rise625;
  clock_divider dut (.exclock(exclock), .clk5g(clk5g), .clk2g5(clk2g5),
                     .clk1g25(clk1g25), .clk625m(clk625m));
  always #100 exclock = ~exclock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  bit go = 0;
  // Half periods: 200, 400, 800 ps.
  always @(clk2g5)  if (go) begin if (last[0] > 0) check($time - last[0] == 200, "clk2g5 half period");  last[0] = $time; end
  always @(clk1g25) if (go) begin if (last[1] > 0) check($time - last[1] == 400, "clk1g25 half period"); last[1] = $time; end
  always @(clk625m) if (go) begin if (last[2] > 0) check($time - last[2] == 800, "clk625m half period"); last[2] = $time; end
  always @(posedge clk625m) if (go) begin
    #1 check(clk2g5 && clk1g25, "aligned rising edges");
  end
  always @(exclock) if (go) check(clk5g == exclock, "clk5g follows exclock");

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    last = '{0, 0, 0};
    repeat (10) @(posedge exclock);
    go = 1;
    repeat (400) @(posedge exclock);
    check(checks > 400, "enough edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
