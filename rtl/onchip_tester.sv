// onchip_tester: on-chip test-pattern generator for an 8-bit, 5 GS/s DAC.
// Write mode (ENABLE high): the serial DATA stream arrives at the slow external CLOCK
// (1 MHz), is packed 64 bits at a time by the serial-to-parallel register and pushed,
// one word per 64 clocks, into a 64 x 32 shift-register memory (2048 bits).
// Read mode (ENABLE low): the control unit switches the memory clock, without a glitch,
// to the 625 MHz read clock from the clock divider, the memory rows recirculate, and the
// 32 stored words are replayed without end. The serializer turns each 64-bit word into
// eight 8-bit DAC words at the 5 GHz EXclock rate.
// Ports: exclock (5 GHz), clock / data / enable / reset from off chip; dac_data and
// clk5g to the DAC under test; read_mode tells that the read clock drives the memory.
// Serial bit n of the stream (n = 64*k + 8*p + t) is stored in word k, bit 8p+t, and
// reaches the DAC as bit p of DAC word 8k + t.
module onchip_tester #(
  parameter int unsigned WORD_W = tester_pkg::WORD_W,
  parameter int unsigned DEPTH  = tester_pkg::DEPTH,
  parameter int unsigned PAGES  = tester_pkg::PAGES
) (
  input  logic             exclock,
  input  logic             clock,
  input  logic             data,
  input  logic             enable,
  input  logic             reset,
  output logic [PAGES-1:0] dac_data,
  output logic             clk5g,
  output logic             read_mode
);
  localparam int unsigned CNT_W = $clog2(WORD_W);

  logic clk2g5, clk1g25, clk625m;
  logic data_s, clk1m, memclk, mem_en, enable_ser;
  logic [WORD_W-1:0] sipo_word, mem_word;

  clock_divider u_div (
    .exclock(exclock), .clk5g(clk5g), .clk2g5(clk2g5), .clk1g25(clk1g25), .clk625m(clk625m)
  );

  control_unit #(.CNT_W(CNT_W)) u_ctrl (
    .clock(clock), .data(data), .enable_in(enable), .reset(reset), .rclk(clk625m),
    .data_out(data_s), .clk1m(clk1m), .memclk(memclk), .enable(mem_en),
    .enable_ser(enable_ser), .read_mode(read_mode)
  );

  sipo #(.WORD_W(WORD_W)) u_sipo (.clk1m(clk1m), .din(data_s), .word(sipo_word));

  shift_memory #(.WORD_W(WORD_W), .DEPTH(DEPTH)) u_mem (
    .memclk(memclk), .enable(mem_en), .wr_word(sipo_word), .rd_word(mem_word)
  );

  serializer #(.PAGES(PAGES)) u_ser (
    .clk5g(clk5g), .clk2g5(clk2g5), .clk1g25(clk1g25), .clk625m(clk625m),
    .d(mem_word), .q(dac_data)
  );
endmodule
