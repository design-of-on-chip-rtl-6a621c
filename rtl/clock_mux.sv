// clock_mux: glitch-free switch between two unrelated clocks, Wclk and Rclk.
// Each branch has a select path of a positive-edge flip-flop (synchroniser against
// the asynchronous select and feedback) followed by a negative-edge flip-flop; a
// branch's request is gated by the other branch's negative-edge output (cross
// feedback), so one branch is switched off, on a falling edge of its own clock, before
// the other is switched on, on a falling edge of its clock. The output is
// (clk_w & en_w) | (clk_r & en_r): each enable changes only while its clock is low,
// so no shortened pulse appears.
// sel_r = 0 selects clk_w, sel_r = 1 selects clk_r. rst (asynchronous, active high)
// selects clk_w. r_active is the read branch enable: high once wrclk follows clk_r.
// Switching takes two rising and one falling edge of each clock.
module clock_mux (
  input  logic clk_w,
  input  logic clk_r,
  input  logic sel_r,
  input  logic rst,
  output logic wrclk,
  output logic r_active
);
  logic w_sync, w_en;
  logic r_sync, r_en;

  always_ff @(posedge clk_w or posedge rst)
    if (rst) w_sync <= 1'b1;
    else     w_sync <= ~sel_r & ~r_en;

  always_ff @(negedge clk_w or posedge rst)
    if (rst) w_en <= 1'b1;
    else     w_en <= w_sync;

  always_ff @(posedge clk_r or posedge rst)
    if (rst) r_sync <= 1'b0;
    else     r_sync <= sel_r & ~w_en;

  always_ff @(negedge clk_r or posedge rst)
    if (rst) r_en <= 1'b0;
    else     r_en <= r_sync;

  assign wrclk    = (clk_w & w_en) | (clk_r & r_en);
  assign r_active = r_en;

  // Never both branches on at once.
  a_one_branch: assert property (@(posedge clk_w) disable iff (rst) !(w_en && r_en));
endmodule
