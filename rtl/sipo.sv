// sipo: serial-to-parallel conversion unit, a WORD_W-bit (64-bit) serial-in,
// parallel-out shift register clocked by clk1M. Each rising edge shifts one data bit
// in at the top and moves the word one place towards bit 0, so after WORD_W edges the
// first bit received is in word[0] and the last in word[WORD_W-1]. The memory takes
// the whole word at once on the edge that follows, so all 64 bits of a word enter the
// memory together. No reset: the register is overwritten before it is used.
module sipo #(
  parameter int unsigned WORD_W = tester_pkg::WORD_W
) (
  input  logic              clk1m,
  input  logic              din,
  output logic [WORD_W-1:0] word
);
  always_ff @(posedge clk1m) word <= {din, word[WORD_W-1:1]};
endmodule
