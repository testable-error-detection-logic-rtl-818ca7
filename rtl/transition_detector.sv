// transition_detector: Din transition detector with timing-violation injection (TD).
//
// X is the XOR of the monitored data input and a second copy of it taken through the
// DL2 delay line and the M1 multiplexer. With tv = 0, M1 forwards the delayed input
// (path w16): X pulses high for DL2 ticks after each transition of din and is low
// while din is stable. With tv = 1, M1 forwards the inverted delayed input (path w15):
// X is then high while din is stable, which tells the C-element that a timing
// violation happened, and dips low for DL2 ticks after a transition.
//
// The detector is separate from the data latch, so the latch can be a standard
// scannable cell. The structure (XOR, delay, M1, inverter) follows the design
// description; the delay in clk ticks (DL2) is this design's time model.
// Timing: x is combinational from din and tv; the delayed copy is DL2 ticks old.
module transition_detector #(
  parameter int unsigned DL2 = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic tv,
  input  logic din,
  output logic x
);
  logic w16;  // delayed din (DL2 output)
  logic w15;  // inverted delayed din
  logic m1;   // M1 output

  delay_line #(.DEPTH(DL2)) u_dl2 (.clk, .rst, .d(din), .q(w16));

  assign w15 = ~w16;
  assign m1  = tv ? w15 : w16;
  assign x   = din ^ m1;
endmodule
