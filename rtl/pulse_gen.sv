// pulse_gen: marks the end of each memory word being written.
// A CNT_W-bit (6-bit) up counter clocked by clk1M with a synchronous reset, and a
// CNT_W-input NAND of its bits: pulse_n is low during the one clk1M cycle in every
// 2**CNT_W (64) in which the counter is all ones. The control unit uses that cycle
// to let one rising edge through to the memory clock.
// The reset value is all ones, so the count returns to all ones exactly 64 clk1M
// rising edges after reset is released, when the first 64 data bits have been
// shifted into the serial-to-parallel register.
module pulse_gen #(
  parameter int unsigned CNT_W = tester_pkg::CNT_W
) (
  input  logic clk1m,
  input  logic rst,
  output logic pulse_n
);
  logic [CNT_W-1:0] count;

  always_ff @(posedge clk1m)
    if (rst) count <= '1;
    else     count <= count + 1'b1;

  assign pulse_n = ~(&count);
endmodule
