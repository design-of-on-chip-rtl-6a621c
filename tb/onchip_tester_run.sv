// onchip_tester_run: the end-to-end test of the whole tester at its default size
// (64 x 32 memory, 8 pages), used by the top-level testbenches. EXclock is 200 ps
// (5 GHz); the write CLOCK period TCLK is a parameter (6.4 ns in the short runs, 1 us
// for the real 1 MHz write clock). ALT selects the data: 0 = 2048 random bits,
// 1 = the alternating 0101... pattern of the reference simulation. It drops
// ENABLE 2048 write clocks after the first data bit, waits for the clock switch, then
// records the 8-bit DAC words and compares three full replays of the memory with the
// order the design promises: serial bit 64k + 8p + t is bit p of DAC word 8k + t.
// It also checks: exactly 32 memory write edges, 64 write clocks apart; the memory
// clock period in read mode (8 EXclock periods) and that no pulse of it or of WRclk
// is shorter than half a read period (no glitch at the clock switch); that clk1M
// is off in read mode; and it counts
// each mechanism (write pulse, clock switch, recirculation) and fails if one never
// happened. Delays are in picoseconds. The watchdog is in the wrapping testbench.
module onchip_tester_run #(
  parameter longint TCLK = 6400,
  parameter bit     ALT  = 1'b0
);
  timeunit 1ps;
  timeprecision 1ps;
  localparam int W = 64, D = 32, P = 8, NBITS = W * D;
  localparam int TEX = 200;

  logic exclock = 1'b0, clock = 1'b0, data = 1'b0, enable = 1'b1, reset = 1'b1;
  logic [P-1:0] dac_data;
  logic clk5g, read_mode;

  int checks = 0, failures = 0;
  logic stim [NBITS];

  onchip_tester dut (
    .exclock(exclock), .clock(clock), .data(data), .enable(enable), .reset(reset),
    .dac_data(dac_data), .clk5g(clk5g), .read_mode(read_mode)
  );

  always #(TEX/2)  exclock = ~exclock;
  always #(TCLK/2) clock   = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected DAC word number j of the replay.
  function automatic logic [P-1:0] expect_word(int j);
    int k = (j / 8) % D, t = j % 8;
    logic [P-1:0] w;
    for (int p = 0; p < P; p++) w[p] = stim[W*k + 8*p + t];
    return w;
  endfunction

  // Memory write edges after the first data bit: count and spacing.
  int  wr_edges = 0;
  longint last_wr = -1;
  bit  counting = 0;
  always @(posedge dut.u_ctrl.memclk) begin
    if (counting && dut.mem_en) begin
      wr_edges++;
      if (last_wr >= 0) check($time - last_wr == 64 * TCLK, "write edge spacing");
      last_wr = $time;
    end
  end

  // The write clock of the serial-to-parallel register must stop in read mode.
  int clk1m_in_read = 0;
  always @(posedge dut.u_ctrl.clk1m) if (read_mode) clk1m_in_read++;

  // Glitch detector on WRclk and the memory clock once the switch has started.
  longint mc_rise = -1, mc_fall = -1, wr_rise = -1, wr_fall = -1;
  bit watch = 0;
  int short_pulses = 0;
  always @(dut.u_ctrl.memclk) if (watch) begin
    if (dut.u_ctrl.memclk) begin
      if (mc_fall >= 0 && $time - mc_fall < 4 * TEX) short_pulses++;
      mc_rise = $time;
    end else begin
      if (mc_rise >= 0 && $time - mc_rise < 4 * TEX) short_pulses++;
      mc_fall = $time;
    end
  end
  always @(dut.u_ctrl.wrclk) if (watch) begin
    if (dut.u_ctrl.wrclk) begin
      if (wr_fall >= 0 && $time - wr_fall < 4 * TEX) short_pulses++;
      wr_rise = $time;
    end else begin
      if (wr_rise >= 0 && $time - wr_rise < 4 * TEX) short_pulses++;
      wr_fall = $time;
    end
  end

  initial begin
    logic [P-1:0] got [4096];
    int n_got, start, switches, loops;
    longint t_enable_low, t_read;
    longint mc_last;
    for (int i = 0; i < NBITS; i++) stim[i] = ALT ? logic'(i % 2) : logic'($urandom % 2);

    // RESET is high for one CLOCK period before P_0, as in the reference run.
    repeat (2) @(posedge clock);
    // P_0: release reset and present data bit 0; bit n is presented at P_n.
    reset = 1'b0;
    data  = stim[0];
    @(posedge clock);
    #1 counting = 1;           // skip the edge that flushes the register at reset release
    data = stim[1];
    for (int n = 2; n < NBITS; n++) begin
      @(posedge clock);
      data = stim[n];
    end
    @(posedge clock);          // P_2048: ENABLE falls, 64 x 32 write clocks after P_0
    enable = 1'b0;
    t_enable_low = $time;
    watch = 1;
    data = 1'b0;

    switches = 0;
    fork
      begin
        @(posedge read_mode);
        switches++;
      end
      begin
        repeat (20) @(posedge clock);
      end
    join_any
    disable fork;
    t_read = $time;
    check(switches == 1, "clock switch to read clock");
    $display("switch to read clock %0d ps after ENABLE fell", t_read - t_enable_low);
    check(wr_edges == D, "32 memory write edges");
    $display("memory write edges: %0d", wr_edges);

    // Read-mode memory clock period.
    @(posedge dut.u_ctrl.memclk);
    mc_last = $time;
    repeat (8) begin
      @(posedge dut.u_ctrl.memclk);
      check($time - mc_last == 8 * TEX, "read clock period 8 EXclock periods");
      mc_last = $time;
    end

    // Record DAC words (sampled mid-period of clk5g).
    n_got = 0;
    repeat (4096) begin
      @(negedge exclock);
      got[n_got++] = dac_data;
    end

    // Find where word 0 of the replay starts (match 64 DAC words in a row).
    start = -1;
    for (int s = 0; s < 512 && start < 0; s++) begin
      bit ok;
      ok = 1;
      for (int j = 0; j < 64; j++) if (got[s + j] !== expect_word(j)) ok = 0;
      if (ok) start = s;
    end
    check(start >= 0, "replay of word 0 found");
    $display("replay starts %0d EXclock periods into the record", start);
    if (start < 0) start = 0;
    loops = 0;
    for (int j = 0; j < 3 * D * 8; j++) begin
      check(got[start + j] == expect_word(j), "DAC word");
      if (j > 0 && j % (D * 8) == 0) loops++;
    end
    check(short_pulses == 0, "no glitch on WRclk or memory clock");
    check(clk1m_in_read == 0, "clk1M stopped in read mode");
    $display("mechanisms: write pulses=%0d clock switches=%0d recirculations=%0d short pulses=%0d",
             wr_edges, switches, loops, short_pulses);
    check(wr_edges > 0, "write pulse happened");
    check(loops > 0, "recirculation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
