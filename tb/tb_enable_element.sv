// tb_enable_element: drives enable SER with random values between WRclk edges and
// checks that enable equals the value present at the previous rising edge and does
// not change between edges.
module tb_enable_element;
  timeunit 1ps;
  timeprecision 1ps;
  logic wrclk = 0, enable_ser = 0, enable, sampled;
  int checks = 0, failures = 0;
  enable_element dut (.wrclk(wrclk), .enable_ser(enable_ser), .enable(enable));
  always #800 wrclk = ~wrclk;
  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(negedge wrclk);
    repeat (300) begin
      enable_ser = logic'($urandom % 2);
      @(posedge wrclk);
      sampled = enable_ser;
      #100 enable_ser = ~enable_ser;
      #100 checks++;
      if (enable !== sampled) begin
        failures++;
        $display("FAIL enable=%b expected %b", enable, sampled);
      end
      @(negedge wrclk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
