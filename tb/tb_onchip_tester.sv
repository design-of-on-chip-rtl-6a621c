// tb_onchip_tester: end-to-end test of the whole tester with every parameter at its
// default: 2048 random bits written with a 6.4 ns (156.25 MHz) write clock, the
// switch to read mode, and three full replays checked word by word at 5 GS/s.
// See onchip_tester_run for the checks.
module tb_onchip_tester;
  timeunit 1ps;
  timeprecision 1ps;
  // Watchdog: the run needs about 2070 write clocks of simulated time.
  initial begin
    #(3000 * longint'(6400));
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", run.checks, run.failures + 1);
    $finish;
  end
  onchip_tester_run #(.TCLK(6400), .ALT(1'b0)) run ();
endmodule
