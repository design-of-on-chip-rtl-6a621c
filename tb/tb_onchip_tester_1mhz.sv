// tb_onchip_tester_1mhz: the whole tester with the real write clock of 1 MHz
// against the 5 GHz EXclock (ratio 5000), 2048 random bits, checked as in
// onchip_tester_run. It simulates about 2.1 ms.
module tb_onchip_tester_1mhz;
  timeunit 1ps;
  timeprecision 1ps;
  // Watchdog: the run needs about 2070 write clocks of simulated time.
  initial begin
    #(3000 * longint'(1000000));
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", run.checks, run.failures + 1);
    $finish;
  end
  onchip_tester_run #(.TCLK(1000000), .ALT(1'b0)) run ();
endmodule
