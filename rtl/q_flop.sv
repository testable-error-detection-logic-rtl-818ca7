// q_flop: Q-Flop sampling a stage's error flag into a dual-rail result.
//
// While the enable en is low both rails are 0 ("no result yet"). On the clk tick where
// en is first seen high, d is captured: err1 = d, err0 = ~d. The result is held while en
// stays high. The Blade controller waits until one rail is high before it decides.
//
// This is the flop-with-enable-reset behaviour the design description uses to stand in
// for the Q-Flop. The real cell's metastability filter is analog and not modelled: in
// this time model d is never metastable. Reset clears both rails.
module q_flop (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic d,
  output logic err1,
  output logic err0
);
  logic en_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q <= 1'b0;
      err1 <= 1'b0;
      err0 <= 1'b0;
    end else begin
      en_q <= en;
      if (!en) begin
        err1 <= 1'b0;
        err0 <= 1'b0;
      end else if (!en_q) begin
        err1 <= d;
        err0 <= ~d;
      end
    end
  end

  // The two rails are never high together
  assert property (@(posedge clk) disable iff (rst) !(err1 && err0));
endmodule
