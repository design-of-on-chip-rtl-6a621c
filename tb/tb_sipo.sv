// tb_sipo: shifts 20 random 64-bit words into the register one bit per clock and
// checks after every 64th clock that the first bit received is in word[0] and the
// last in word[63].
module tb_sipo;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int W = 64;
  logic clk1m = 0, din = 0;
  logic [W-1:0] word, expect_w;
  int checks = 0, failures = 0;
  sipo dut (.clk1m(clk1m), .din(din), .word(word));
  always #500 clk1m = ~clk1m;
  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20) begin
      expect_w = {$urandom, $urandom};
      for (int i = 0; i < W; i++) begin
        @(negedge clk1m);
        din = expect_w[i];
      end
      @(negedge clk1m);
      checks++;
      if (word !== expect_w) begin
        failures++;
        $display("FAIL word=%h expected %h", word, expect_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
