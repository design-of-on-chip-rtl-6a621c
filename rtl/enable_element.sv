// enable_element: one D flip-flop clocked by WRclk that turns enable SER into the
// memory enable. Because it samples on the same rising edge that clocks the memory,
// the memory sees the old value on that edge: when ENABLE falls, the final write
// edge still takes the last word from the serial-to-parallel register, and only the
// edges after it recirculate. enable = 1: write mode (memory loads from the SIPO),
// enable = 0: read mode (memory rows feed back on themselves). Latency: one WRclk edge.
module enable_element (
  input  logic wrclk,
  input  logic enable_ser,
  output logic enable
);
  always_ff @(posedge wrclk) enable <= enable_ser;
endmodule
