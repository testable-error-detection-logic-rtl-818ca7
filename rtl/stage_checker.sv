// stage_checker: the six observation outputs of one TEDL stage.
//
// From the dual-rail outputs of the stage's N_QF Q-Flops and their G6 checkers:
//   w11 = G3  = OR  of Err1   (to the controller: an error was seen)
//   w12 = G4  = AND of Err0   (to the controller: no error anywhere)
//   w20 = G7  = AND of Err1   (every Q-Flop flagged: catches one Err1 stuck at 0)
//   w21 = G8  = OR  of Err0   (some Q-Flop did not flag: catches one Err0 stuck at 1)
//   w22 = G9  = AND of G6
//   w23 = G10 = OR  of G6
// G3 and G4 are the original error combination; G7 to G10 are the added checkers. With
// a fault-free stage and stable data the outputs equal the gold pattern of the mode
// (tedl_pkg::gold_pattern). Which gate takes which inputs is reconstructed from the
// gold patterns and fault examples of the design description. Purely combinational.
module stage_checker #(
  parameter int unsigned N_QF = 10
) (
  input  logic [N_QF-1:0]    err1,
  input  logic [N_QF-1:0]    err0,
  input  logic [N_QF-1:0]    g6,
  output tedl_pkg::tedl_obs_t obs
);
  always_comb begin
    obs.w11 = |err1;
    obs.w12 = &err0;
    obs.w20 = &err1;
    obs.w21 = |err0;
    obs.w22 = &g6;
    obs.w23 = |g6;
  end
endmodule
