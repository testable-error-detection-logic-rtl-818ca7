// qflop_group: the logic that shares one Q-Flop among several C-elements.
//
// G2 ORs the M2 outputs of N_CE C-element slices; the Q-Flop samples that OR when the
// stage's enable rises and drives the dual-rail Err1/Err0 of the group. G6, a concurrent
// checker, ANDs the same M2 outputs: with tv = 1 all of them must be high, so G6 sees a
// single C-element (tm = 0) or G5 (tm = 1) output stuck at 0, which the G2 OR would hide.
// Without tv, G6 is 0.
//
// G2 and the Q-Flop follow the design description; taking G6 as the AND of the group's
// M2 outputs is this design's reconstruction. Timing: g6 is combinational and, in the
// normal modes, valid only while the C-elements hold (until DL1 after CLK falls);
// err1/err0 change one tick after sample rises or falls.
module qflop_group #(
  parameter int unsigned N_CE = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sample,
  input  logic [N_CE-1:0] m2,
  output logic            err1,
  output logic            err0,
  output logic            g6
);
  logic w7;  // G2 output, Q-Flop data input

  assign w7 = |m2;
  assign g6 = &m2;

  q_flop u_qf (.clk, .rst, .en(sample), .d(w7), .err1, .err0);
endmodule
