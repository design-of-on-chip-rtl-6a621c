// tb_pulse_gen: holds the synchronous reset for a few clocks, then counts clk1M
// rising edges and checks that pulse_n is low exactly when 64k - 1 edges have passed
// since the first edge after reset release (k >= 0 counts the words), i.e. that the
// first pulse precedes the first edge and then one cycle in every 64 is marked. It
// also checks that a reset in mid-count restarts the sequence.
module tb_pulse_gen;
  timeunit 1ps;
  timeprecision 1ps;
  logic clk1m = 0, rst = 1, pulse_n;
  int checks = 0, failures = 0, pulses = 0;
  pulse_gen dut (.clk1m(clk1m), .rst(rst), .pulse_n(pulse_n));
  always #500 clk1m = ~clk1m;
  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic run(input int edges);
    // Before edge e (e = 0, 1, ...) pulse_n is low iff e % 64 == 0.
    for (int e = 0; e < edges; e++) begin
      @(negedge clk1m);
      checks++;
      if (pulse_n !== !(e % 64 == 0)) begin
        failures++;
        $display("FAIL before edge %0d pulse_n=%b", e, pulse_n);
      end
      if (!pulse_n) pulses++;
      @(posedge clk1m);
    end
  endtask
  initial begin
    repeat (3) @(posedge clk1m);
    #100 rst = 0;
    run(300);
    #100 rst = 1;
    @(posedge clk1m);
    #100 rst = 0;
    run(200);
    checks++;
    if (pulses != 5 + 4) failures++;
    $display("pulses seen: %0d", pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
