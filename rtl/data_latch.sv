// data_latch: bank of pipeline latches monitored by the transition detectors.
//
// Transparent while en (the stage's latch clock CLK) is high, holding while it is low.
// In the TEDL these are plain latches, separate from the detectors, so a standard
// level-sensitive scan cell can replace them. In this design's time model the latch is
// sampled on the reference clock clk: q follows d one tick later while en is high.
// Reset clears q (a choice of this design).
module data_latch #(
  parameter int unsigned WIDTH = 119
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end
endmodule
