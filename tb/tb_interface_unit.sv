// tb_interface_unit: drives random DATA, ENABLE and RESET values that change on the
// rising edge of CLOCK and checks that each output takes the value present at the
// falling edge (one falling-edge latency), holds it through the next rising edge, and
// that wclk follows CLOCK.
module tb_interface_unit;
  timeunit 1ps;
  timeprecision 1ps;
  logic clock = 0, data = 0, enable = 0, reset = 0;
  logic wclk, data_out, enable_ser, rst;
  logic [2:0] drv;
  int checks = 0, failures = 0;
  interface_unit dut (.clock(clock), .data(data), .enable(enable), .reset(reset),
                      .wclk(wclk), .data_out(data_out), .enable_ser(enable_ser), .rst(rst));
  always #3200 clock = ~clock;
  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300) begin
      @(posedge clock);
      #10 drv = 3'($urandom);
      {data, enable, reset} = drv;
      #10 checks++;
      if (wclk !== clock) failures++;
      @(negedge clock);
      #10 checks++;
      if ({data_out, enable_ser, rst} !== drv) begin
        failures++;
        $display("FAIL got %b expected %b", {data_out, enable_ser, rst}, drv);
      end
      {data, enable, reset} = ~drv;   // change mid-way: must not reach the outputs
      @(posedge clock);
      #1 checks++;
      if ({data_out, enable_ser, rst} !== drv) begin
        failures++;
        $display("FAIL outputs changed away from the falling edge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
