// ser8_page: one 8:1 serializer page, a three-level tree of 2:1 units: four Unit625M
// (clocked by clk1g25, phase from clk625m), two Unit1.25G (clk2g5 / clk1g25) and one
// Unit2.5G (clk5g / clk2g5), which also retimes the stream to the 5 GHz clock.
// The eight inputs are wired to the first level in the order b0, b4, b2, b6, b1, b5,
// b3, b7: the first level then carries (b0,b4) (b2,b6) (b1,b5) (b3,b7), the second the
// even bits b0,b2,b4,b6 and the odd bits b1,b3,b5,b7 at 2.5 Gb/s, and the last level
// interleaves them so that q sends d[0], d[1], ..., d[7], one bit per clk5g period.
// d is sampled at the falling edge of clk625m; d[0] leaves q three clk5g periods after
// that edge, so the page delay is fixed and each 8-bit word follows the previous one
// without a gap.
module ser8_page (
  input  logic       clk5g,
  input  logic       clk2g5,
  input  logic       clk1g25,
  input  logic       clk625m,
  input  logic [7:0] d,
  output logic       q
);
  logic [3:0] l1;
  logic [1:0] l2;

  ser2_unit u625_0 (.clk_fast(clk1g25), .clk_slow(clk625m), .a(d[0]), .b(d[4]), .q(l1[0]));
  ser2_unit u625_1 (.clk_fast(clk1g25), .clk_slow(clk625m), .a(d[2]), .b(d[6]), .q(l1[1]));
  ser2_unit u625_2 (.clk_fast(clk1g25), .clk_slow(clk625m), .a(d[1]), .b(d[5]), .q(l1[2]));
  ser2_unit u625_3 (.clk_fast(clk1g25), .clk_slow(clk625m), .a(d[3]), .b(d[7]), .q(l1[3]));

  ser2_unit u1g25_0 (.clk_fast(clk2g5), .clk_slow(clk1g25), .a(l1[0]), .b(l1[1]), .q(l2[0]));
  ser2_unit u1g25_1 (.clk_fast(clk2g5), .clk_slow(clk1g25), .a(l1[2]), .b(l1[3]), .q(l2[1]));

  ser2_unit u2g5 (.clk_fast(clk5g), .clk_slow(clk2g5), .a(l2[0]), .b(l2[1]), .q(q));
endmodule
