// tb_clock_mux: switches between a 6.4 ns clock and an unrelated 1.6 ns clock
// (random phase, 1.63 ns period so the edges drift) several times in both directions,
// with the select changed at random times. It checks that wrclk equals the selected
// clock once the switch has settled, that it equals the old clock before the
// switch starts, that no high or low pulse of wrclk is shorter than half the faster
// clock's period, and that the switch takes at most a few cycles of each clock.
module tb_clock_mux;
  timeunit 1ps;
  timeprecision 1ps;
  logic clk_w = 0, clk_r = 0, sel_r = 0, rst = 1;
  logic wrclk, r_active;
  int checks = 0, failures = 0, short_pulses = 0, switches = 0;
  longint last_edge = 0;
  clock_mux dut (.clk_w(clk_w), .clk_r(clk_r), .sel_r(sel_r), .rst(rst),
                 .wrclk(wrclk), .r_active(r_active));
  always #3200 clk_w = ~clk_w;
  initial begin
    #($urandom % 700);
    forever #815 clk_r = ~clk_r;
  end
  always @(wrclk) begin
    if (!rst && last_edge > 0 && $time - last_edge < 800) begin
      short_pulses++;
      $display("short pulse at %0t", $time);
    end
    last_edge = $time;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic follow(input bit want_r, input int n);
    repeat (n) begin
      #($urandom % 400 + 37);
      check(wrclk == (want_r ? clk_r : clk_w), "wrclk follows selected clock");
      check(r_active == want_r, "r_active");
    end
  endtask
  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000 rst = 0;
    follow(0, 100);
    repeat (6) begin
      #($urandom % 5000);
      sel_r = ~sel_r;
      switches++;
      // Settling: at most two edges of each clock plus one more.
      #(3 * 6400 + 3 * 1630);
      follow(sel_r, 200);
    end
    check(short_pulses == 0, "no glitch");
    $display("switches=%0d short pulses=%0d", switches, short_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
