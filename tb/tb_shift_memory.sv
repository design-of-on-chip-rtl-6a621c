// tb_shift_memory: writes 32 random words with enable high (plus 5 older words that
// must be pushed out), then reads with enable low for three times the depth and
// checks that the words come out first in, first out and then repeat with a period
// of 32 memory clocks. Halfway through the read it writes two more words and
// checks they displace the two oldest.
module tb_shift_memory;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int W = 64, D = 32;
  logic memclk = 0, enable = 1;
  logic [W-1:0] wr_word = '0, rd_word;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0;
  shift_memory dut (.memclk(memclk), .enable(enable), .wr_word(wr_word), .rd_word(rd_word));
  always #800 memclk = ~memclk;
  // Reference model: model[0] is the oldest word, the one rd_word must show.
  always @(posedge memclk) begin
    logic [W-1:0] nw;
    nw = enable ? wr_word : model[0];
    void'(model.pop_front());
    model.push_back(nw);
  end
  task automatic check_out();
    checks++;
    if (rd_word !== model[0]) begin
      failures++;
      $display("FAIL rd_word=%h expected %h", rd_word, model[0]);
    end
  endtask
  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < D; i++) model.push_back('0);
    @(negedge memclk);
    for (int i = 0; i < D + 5; i++) begin
      wr_word = {$urandom, $urandom};
      @(negedge memclk);
    end
    enable = 0;
    for (int i = 0; i < 3 * D; i++) begin
      @(negedge memclk);
      check_out();
      if (i == 40) begin
        enable = 1;
        repeat (2) begin
          wr_word = {$urandom, $urandom};
          @(negedge memclk);
          check_out();
        end
        enable = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
