// ser2_unit: 2:1 serializer stage of the tree (Unit625M, Unit1.25G or Unit2.5G,
// named after the rate of its inputs). Inputs a and b each carry one bit per period of
// clk_slow; the output q carries two bits per period, a then b, timed by clk_fast
// (twice the frequency of clk_slow, rising edges aligned).
// A negative-edge register samples the level of clk_slow in the middle of each
// clk_fast period, away from both clocks' edges. On the next rising edge of clk_fast
// that level tells which half of the slow period begins: if clk_slow was high (the
// edge is a falling edge of clk_slow), a goes to q and b is held; otherwise the held
// b goes to q. Both inputs are thus sampled mid-way through their bit, and q is a
// register output. Latency: a appears on q at the falling edge of clk_slow, b one
// clk_fast period later.
module ser2_unit (
  input  logic clk_fast,
  input  logic clk_slow,
  input  logic a,
  input  logic b,
  output logic q
);
  logic b_h, slow_high;

  always_ff @(negedge clk_fast) slow_high <= clk_slow;

  always_ff @(posedge clk_fast)
    if (slow_high) begin
      q   <= a;
      b_h <= b;
    end else begin
      q   <= b_h;
    end
endmodule
