// shift_memory: the 2048-bit test-pattern memory, WORD_W rows (64) of DEPTH-stage
// (32) shift registers, each stage a flip-flop. All rows share the memory clock
// clk1M-625M; on every rising edge each word moves one column on, so the memory is a
// first-in first-out store and rd_word is always the oldest word (the last column).
// One 2:1 multiplexer per row chooses what enters column 0:
//   enable = 1 (write mode): the word from the serial-to-parallel register;
//   enable = 0 (read mode):  the row's own last column, so the DEPTH stored words
//                            circulate and are replayed in the order they were written,
//                            word 0 first, with a period of DEPTH memory clocks.
// After DEPTH write edges the first word written is at rd_word. No reset: the contents
// are whatever was written.
module shift_memory #(
  parameter int unsigned WORD_W = tester_pkg::WORD_W,
  parameter int unsigned DEPTH  = tester_pkg::DEPTH
) (
  input  logic              memclk,
  input  logic              enable,
  input  logic [WORD_W-1:0] wr_word,
  output logic [WORD_W-1:0] rd_word
);
  logic [WORD_W-1:0] col [DEPTH];

  always_ff @(posedge memclk) begin
    col[0] <= enable ? wr_word : col[DEPTH-1];
    for (int i = 1; i < DEPTH; i++) col[i] <= col[i-1];
  end

  assign rd_word = col[DEPTH-1];
endmodule
