// serializer: the serializer unit, PAGES (8) 8:1 pages side by side. The 64-bit
// memory word is taken as eight groups of eight bits; group p (bits 8p..8p+7) feeds
// page p, whose 5 Gb/s stream is bit p of the DAC word. So in each 625 MHz period the
// DAC receives eight 8-bit words: word t (t = 0..7) has bit p = d[8p + t].
module serializer #(
  parameter int unsigned PAGES = tester_pkg::PAGES
) (
  input  logic               clk5g,
  input  logic               clk2g5,
  input  logic               clk1g25,
  input  logic               clk625m,
  input  logic [PAGES*8-1:0] d,
  output logic [PAGES-1:0]   q
);
  for (genvar p = 0; p < PAGES; p++) begin : g_page
    ser8_page u_page (
      .clk5g(clk5g), .clk2g5(clk2g5), .clk1g25(clk1g25), .clk625m(clk625m),
      .d(d[8*p +: 8]), .q(q[p])
    );
  end
endmodule
