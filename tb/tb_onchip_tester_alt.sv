// tb_onchip_tester_alt: the reference simulation of the whole tester: EXclock
// 200 ps, CLOCK 6.4 ns, RESET high for one clock, ENABLE high for 64 x 32 clocks and
// the alternating data pattern 0 1 0 1 ..., checked as in onchip_tester_run.
module tb_onchip_tester_alt;
  timeunit 1ps;
  timeprecision 1ps;
  // Watchdog: the run needs about 2070 write clocks of simulated time.
  initial begin
    #(3000 * longint'(6400));
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", run.checks, run.failures + 1);
    $finish;
  end
  onchip_tester_run #(.TCLK(6400), .ALT(1'b1)) run ();
endmodule
