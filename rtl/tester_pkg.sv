// tester_pkg: sizes shared by the on-chip test-pattern memory.
// The memory holds DEPTH words of WORD_W bits (64 x 32 = 2048 bits). Each word is
// split into PAGES groups of eight bits; every group feeds one 8:1 serializer page,
// so one memory word becomes eight consecutive PAGES-bit DAC words.
// The pulse counter has CNT_W bits, enough to count the WORD_W write clocks of one word.
package tester_pkg;
  localparam int unsigned WORD_W    = 64;
  localparam int unsigned DEPTH     = 32;
  localparam int unsigned PAGES     = 8;
  localparam int unsigned CNT_W     = $clog2(WORD_W);
endpackage
