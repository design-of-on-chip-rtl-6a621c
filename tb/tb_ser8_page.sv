// tb_ser8_page: makes the four clocks with its own 3-bit down counter on a 200 ps
// EXclock, feeds one random byte per clk625m period (changed just after the rising
// edge) and checks the 5 Gb/s output bit by bit: byte k, bit t must be on q during
// the EXclock period that starts 3 + t periods after the falling edge of clk625m in
// period k, for 200 bytes in a row with no gap. This fixes both the bit order
// d[0] first and the latency.
module tb_ser8_page;
  timeunit 1ps;
  timeprecision 1ps;
  logic exclock = 0;
  logic [2:0] div = '0;
  logic clk2g5, clk1g25, clk625m, q;
  logic [7:0] d = '0;
  logic [7:0] bytes[$];
  int checks = 0, failures = 0;
  ser8_page dut (.clk5g(exclock), .clk2g5(clk2g5), .clk1g25(clk1g25), .clk625m(clk625m),
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
  // Driver: a new byte after each rising edge of clk625m.
  initial begin
    forever begin
      @(posedge clk625m);
      #20 d = 8'($urandom);
      bytes.push_back(d);
    end
  end
  // Recorder: q in the middle of every EXclock period, and, for every falling edge
  // of clk625m, the record index it falls at and the byte it must sample.
  logic   rec[$];
  int     fall_idx[$];
  logic [7:0] fall_byte[$];
  always @(negedge exclock) rec.push_back(q);
  always @(negedge clk625m) begin
    fall_idx.push_back(rec.size());
    fall_byte.push_back(d);
  end
  initial begin
    repeat (210) @(posedge clk625m);
    // The falling edge comes one EXclock rising edge after the record index noted, so
    // bit t sits at index + 3 + t.
    for (int k = 2; k < 202; k++)
      for (int t = 0; t < 8; t++) begin
        checks++;
        if (rec[fall_idx[k] + 3 + t] !== fall_byte[k][t]) begin
          failures++;
          if (failures < 10) $display("FAIL byte %0d bit %0d", k, t);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
