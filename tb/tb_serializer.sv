// tb_serializer: makes the four clocks with its own 3-bit down counter on a 200 ps
// EXclock, feeds one random 64-bit word per clk625m period (changed just after the
// rising edge) and checks the 8-bit output: in the EXclock period that starts 3 + t
// periods after the falling edge of clk625m that samples word k, q[p] must be bit
// 8p + t of word k, for 100 words in a row.
module tb_serializer;
  timeunit 1ps;
  timeprecision 1ps;
  logic exclock = 0;
  logic [2:0] div = '0;
  logic clk2g5, clk1g25, clk625m;
  logic [63:0] d = '0;
  logic [7:0] q;
  int checks = 0, failures = 0;
  serializer dut (.clk5g(exclock), .clk2g5(clk2g5), .clk1g25(clk1g25), .clk625m(clk625m),
                  .d(d), .q(q));
  always #100 exclock = ~exclock;
  always @(posedge exclock) div <= div - 1'b1;
  assign {clk625m, clk1g25, clk2g5} = div;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial forever begin
    @(posedge clk625m);
    #20 d = {$urandom, $urandom};
  end

  logic [7:0]  rec[$];
  int          fall_idx[$];
  logic [63:0] fall_word[$];
  always @(negedge exclock) rec.push_back(q);
  always @(negedge clk625m) begin
    fall_idx.push_back(rec.size());
    fall_word.push_back(d);
  end
  initial begin
    logic [7:0] want;
    repeat (110) @(posedge clk625m);
    for (int k = 2; k < 102; k++)
      for (int t = 0; t < 8; t++) begin
        for (int p = 0; p < 8; p++) want[p] = fall_word[k][8*p + t];
        checks++;
        if (rec[fall_idx[k] + 3 + t] !== want) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d slot %0d got %h want %h", k, t, rec[fall_idx[k] + 3 + t], want);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
