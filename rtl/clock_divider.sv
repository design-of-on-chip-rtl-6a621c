// clock_divider: makes the four clocks of the tester from the 5 GHz EXclock.
// A synchronous 3-bit counter of three T flip-flops, all clocked by EXclock, with one
// AND gate. The toggle inputs come from the Q-bar outputs (T1 = ~Q0, T2 = ~Q0 & ~Q1),
// so the counter counts down and all three Q outputs rise together on the 000 -> 111
// step: clk2g5, clk1g25 and clk625m have aligned rising edges, which follow the
// EXclock rising edge that causes them by one flip-flop delay. clk5g is EXclock
// itself (the buffer in front of it has no logic function). The Q-bar output of
// the third flip-flop is left open.
// Outputs: clk5g = EXclock, clk2g5 = /2, clk1g25 = /4, clk625m = /8 (the read clock Rclk).
module clock_divider (
  input  logic exclock,
  output logic clk5g,
  output logic clk2g5,
  output logic clk1g25,
  output logic clk625m
);
  logic q0, q1, q2, q0n, q1n;
  logic t2;

  assign t2 = q0n & q1n;

  tff u_tff0 (.clk(exclock), .t(1'b1), .q(q0), .qn(q0n));
  tff u_tff1 (.clk(exclock), .t(q0n),  .q(q1), .qn(q1n));
  tff u_tff2 (.clk(exclock), .t(t2),   .q(q2), .qn());

  assign clk5g   = exclock;
  assign clk2g5  = q0;
  assign clk1g25 = q1;
  assign clk625m = q2;
endmodule
