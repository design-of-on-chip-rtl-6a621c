// tff: toggle flip-flop, one D flip-flop whose input is a 2:1 multiplexer choosing
// Q (hold, t = 0) or Q-bar (toggle, t = 1). Rising-edge clocked, no reset: in the
// clock divider any start state gives the same divided clocks, only their phase differs.
module tff (
  input  logic clk,
  input  logic t,
  output logic q,
  output logic qn
);
  always_ff @(posedge clk) q <= t ? ~q : q;
  assign qn = ~q;
endmodule
