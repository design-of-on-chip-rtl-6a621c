// control_unit: derives every clock and control signal of the write and read modes.
// Parts: the interface unit (negative-edge capture of CLOCK, DATA, ENABLE, RESET),
// the pulse generation unit (one marked cycle in every 64 write clocks), the clock
// multiplexing unit (glitch-free switch of WRclk from Wclk to Rclk), the enable
// element (enable SER delayed by one WRclk edge) and two gating multiplexers:
//   clk1m  = Wclk gated by enable SER. It clocks the serial-to-parallel register and
//            the pulse counter and stops once ENABLE has gone low (memory full).
//            enable SER changes on the falling edge of Wclk, so the AND gate is clean.
//   memclk = clk1M-625M = WRclk | hold, hold = enable & pulse_n. In write mode
//            (enable = 1) memclk stays high except for the second half of every 64th
//            write cycle: one rising edge per assembled word. hold changes only just
//            after a rising edge of WRclk, while WRclk is high, so memclk has no glitch.
//            In read mode (enable = 0) memclk is WRclk, which the glitch-free switch
//            hands from Wclk to Rclk (625 MHz); the switch turns Wclk off on the
//            falling edge after the last write edge, so no slow edge reaches the
//            memory once it recirculates.
// ENABLE timing: number the rising edges of CLOCK from the one at which data bit 0
// and RESET low are presented (edge 0). ENABLE may be lowered at any of edges 2048 to
// 2111; the last word is then written with enable still high on edge 2049, and
// enable is low before the next pulse could come.
// Outputs: data_out (DATAOUT), clk1m, memclk (clk1M-625M), enable, enable_ser, and
// read_mode (the clock switch has reached Rclk).
module control_unit #(
  parameter int unsigned CNT_W = tester_pkg::CNT_W
) (
  input  logic clock,
  input  logic data,
  input  logic enable_in,
  input  logic reset,
  input  logic rclk,
  output logic data_out,
  output logic clk1m,
  output logic memclk,
  output logic enable,
  output logic enable_ser,
  output logic read_mode
);
  logic wclk, rst, pulse_n, wrclk, r_active, hold;

  interface_unit u_if (
    .clock(clock), .data(data), .enable(enable_in), .reset(reset),
    .wclk(wclk), .data_out(data_out), .enable_ser(enable_ser), .rst(rst)
  );

  assign clk1m = wclk & enable_ser;

  pulse_gen #(.CNT_W(CNT_W)) u_pulse (
    .clk1m(clk1m), .rst(rst), .pulse_n(pulse_n)
  );

  clock_mux u_cmux (
    .clk_w(wclk), .clk_r(rclk), .sel_r(~enable_ser), .rst(rst),
    .wrclk(wrclk), .r_active(r_active)
  );

  enable_element u_en (.wrclk(wrclk), .enable_ser(enable_ser), .enable(enable));

  assign hold      = enable & pulse_n;
  assign memclk    = wrclk | hold;
  assign read_mode = r_active;
endmodule
