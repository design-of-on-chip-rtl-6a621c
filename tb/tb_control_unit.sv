// tb_control_unit: runs the control unit through reset, a write phase of 3 words
// (3 x 64 write clocks, ENABLE dropped 10 clocks into its allowed window) and the
// switch to read mode, with CLOCK at 6.4 ns and Rclk at
// 1.6 ns. Checks: DATAOUT is DATA delayed to the falling edge; the memory clock rises
// in write mode only on write clocks number 0 (flushing the register), 64, 128, 192
// (counted from the first write clock that sees reset low) and with enable high; no
// memory clock edge happens between the last write edge and the switch; after the
// switch the memory clock equals Rclk, enable is low and clk1M has stopped; and no
// memory clock pulse is shorter than half an Rclk period.
module tb_control_unit;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int TCLK = 6400, TR = 1600, WORDS = 3;
  logic clock = 0, data = 0, enable_in = 1, reset = 1, rclk = 0;
  logic data_out, clk1m, memclk, enable, enable_ser, read_mode;
  int checks = 0, failures = 0;
  longint t_p0 = -1;        // time of the CLOCK edge at which RESET is released
  int wr_edges[$];
  int read_edges = 0, clk1m_after = 0, short_pulses = 0;
  longint last_mc = 0;
  bit in_read = 0;

  control_unit dut (.clock(clock), .data(data), .enable_in(enable_in), .reset(reset),
                    .rclk(rclk), .data_out(data_out), .clk1m(clk1m), .memclk(memclk),
                    .enable(enable), .enable_ser(enable_ser), .read_mode(read_mode));

  always #(TCLK/2) clock = ~clock;
  initial begin
    #1234;
    forever #(TR/2) rclk = ~rclk;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge memclk) begin
    if (!in_read) begin
      check(enable, "enable high on write edge");
      // Write clock number n is the (n+1)-th CLOCK edge after t_p0.
      if (t_p0 >= 0 && $time > t_p0) wr_edges.push_back(int'(($time - t_p0) / TCLK) - 1);
    end else read_edges++;
  end
  always @(memclk) begin
    if (last_mc > 0 && $time - last_mc < TR / 2) short_pulses++;
    last_mc = $time;
  end
  always @(posedge clk1m) if (in_read) clk1m_after++;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic d;
    repeat (4) @(posedge clock);
    reset = 0;
    t_p0 = $time;
    for (int n = 0; n < 64 * WORDS; n++) begin
      d = logic'($urandom % 2);
      data = d;
      @(negedge clock);
      #1 check(data_out == d, "DATAOUT");
      @(posedge clock);
    end
    // ENABLE falls 10 clocks into the allowed window, so the pulse counter stops
    // part-way and the memory clock must still follow Rclk in read mode.
    repeat (10) @(posedge clock);
    enable_in = 0;
    @(posedge read_mode);
    in_read = 1;
    check(wr_edges.size() == WORDS + 1, "number of write edges");
    for (int i = 0; i < wr_edges.size(); i++) check(wr_edges[i] == 64 * i, "write edge position");
    repeat (50) begin
      @(rclk);
      #1 check(memclk == rclk, "memclk follows Rclk");
      check(!enable, "enable low in read mode");
    end
    check(read_edges >= 20, "memory clocked in read mode");
    check(clk1m_after == 0, "clk1M stopped");
    check(short_pulses == 0, "no glitch on memory clock");
    $display("write edges at %p, read edges %0d", wr_edges, read_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
