// interface_unit: brings the four slow external signals on chip.
// Wclk is the external CLOCK passed through a driver (a wire here). DATA, ENABLE and
// RESET are each captured in a negative-edge flip-flop, so all three outputs change
// on the falling edge of Wclk and are stable around every rising edge, where the
// write logic (SIPO, pulse counter, clock switch) uses them.
// Outputs: wclk, data_out (DATAOUT), enable_ser (enable SER, also called ENABLEOUT), rst.
// Latency: one falling edge of Wclk.
module interface_unit (
  input  logic clock,
  input  logic data,
  input  logic enable,
  input  logic reset,
  output logic wclk,
  output logic data_out,
  output logic enable_ser,
  output logic rst
);
  assign wclk = clock;

  always_ff @(negedge wclk) begin
    data_out   <= data;
    enable_ser <= enable;
    rst        <= reset;
  end
endmodule
