// tb_tff: drives the toggle flip-flop with a random toggle input for 200 clocks and
// compares Q and Q-bar with a reference model that starts from the flip-flop's own
// first value (the flip-flop has no reset).
module tb_tff;
  timeunit 1ps;
  timeprecision 1ps;
  logic clk = 0, t = 0, q, qn, ref_q;
  int checks = 0, failures = 0;
  tff dut (.clk(clk), .t(t), .q(q), .qn(qn));
  always #50 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(negedge clk);
    ref_q = q;
    repeat (200) begin
      t = logic'($urandom % 2);
      @(posedge clk);
      if (t) ref_q = ~ref_q;
      @(negedge clk);
      checks++;
      if (q !== ref_q || qn !== ~ref_q) begin
        failures++;
        $display("FAIL q=%b expected %b", q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
