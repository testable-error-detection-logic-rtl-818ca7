// celem_slice: one C-element of the TEDL with its concurrent checker G5 and mux M2.
//
// The NX transition-detector outputs x feed both the asymmetric C-element and G5, an
// AND of the same NX signals. M2 forwards the C-element output (w17, tm = 0) or the G5
// output (w18, tm = 1) towards the G2 OR and the Q-Flop, and to the G6 checker of the
// Q-Flop group. In test mode with tv = 1 every x is forced high, so G5 is high only if
// every x line is intact; the C-element alone would hide a stuck-at-0 on one x line
// because any single high input sets it.
//
// Structure per the design description; reading G5 as the AND of this C-element's x
// inputs is this design's reconstruction. Timing: the tm path is combinational, the
// C-element path has one clk tick of latency.
module celem_slice #(
  parameter int unsigned NX = 3
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ckd,
  input  logic          tm,
  input  logic [NX-1:0] x,
  output logic          m2
);
  logic w17;  // C-element output
  logic g5;   // G5 output (w18)

  c_element #(.NX(NX)) u_cel (.clk, .rst, .ckd, .x, .c(w17));

  assign g5 = &x;
  assign m2 = tm ? g5 : w17;
endmodule
