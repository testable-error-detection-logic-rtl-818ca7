// tedl_stage: testable error detection logic of one Blade pipeline stage.
//
// N_TD latches each have a transition detector on their data input. The detector
// outputs are grouped TD_PER_CE at a time into C-element slices (C-element, G5 checker,
// M2 mux); the last slice takes whatever remains when N_TD is not a multiple. CE_PER_QF
// slices share a Q-Flop through G2 (qflop_group). The C-elements see the latch clock
// through the compensation delay DL1, so a transition that arrives shortly before CLK
// rises (its X pulse is at most DL2 ticks long) is not flagged; one during the
// transparent phase (time borrowing) is. The Q-Flop enable sample is raised by the
// stage controller after CLK falls, and the stage checker turns the Q-Flop and G6
// outputs into the six observation bits.
//
// Operating modes (global tm, tv): NM 00, NMTV 01, TM 10, TMTV 11; see tedl_pkg.
// obs.w11 / obs.w12 are the dual-rail Err1 / Err0 the controller waits on. Both are 0
// while sample is low; one tick after sample rises they carry the stage's verdict.
//
// Grouping and gates follow the design description; the single DL1 per stage, the
// delays in reference-clock ticks and the separate sample input are this design's choices.
module tedl_stage #(
  parameter int unsigned N_TD      = 119,
  parameter int unsigned TD_PER_CE = 3,
  parameter int unsigned CE_PER_QF = 4,
  parameter int unsigned DL1       = 3,
  parameter int unsigned DL2       = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                tm,
  input  logic                tv,
  input  logic                lclk,
  input  logic                sample,
  input  logic [N_TD-1:0]     din,
  output logic [N_TD-1:0]     q,
  output tedl_pkg::tedl_obs_t obs
);
  localparam int unsigned N_CE = (N_TD + TD_PER_CE - 1) / TD_PER_CE;
  localparam int unsigned N_QF = (N_CE + CE_PER_QF - 1) / CE_PER_QF;

  logic [N_TD-1:0] x;     // transition detector outputs
  logic [N_CE-1:0] m2;    // slice outputs to G2
  logic [N_QF-1:0] err1, err0, g6;
  logic            ckd;   // latch clock after DL1

  data_latch #(.WIDTH(N_TD)) u_latch (.clk, .rst, .en(lclk), .d(din), .q);

  delay_line #(.DEPTH(DL1)) u_dl1 (.clk, .rst, .d(lclk), .q(ckd));

  for (genvar i = 0; i < N_TD; i++) begin : g_td
    transition_detector #(.DL2(DL2)) u_td (.clk, .rst, .tv, .din(din[i]), .x(x[i]));
  end

  for (genvar c = 0; c < N_CE; c++) begin : g_ce
    localparam int unsigned LO = c * TD_PER_CE;
    localparam int unsigned NX = (N_TD - LO < TD_PER_CE) ? N_TD - LO : TD_PER_CE;
    celem_slice #(.NX(NX)) u_slice (
      .clk, .rst, .ckd, .tm, .x(x[LO +: NX]), .m2(m2[c])
    );
  end

  for (genvar f = 0; f < N_QF; f++) begin : g_qf
    localparam int unsigned LO = f * CE_PER_QF;
    localparam int unsigned NC = (N_CE - LO < CE_PER_QF) ? N_CE - LO : CE_PER_QF;
    qflop_group #(.N_CE(NC)) u_grp (
      .clk, .rst, .sample, .m2(m2[LO +: NC]),
      .err1(err1[f]), .err0(err0[f]), .g6(g6[f])
    );
  end

  stage_checker #(.N_QF(N_QF)) u_chk (.err1, .err0, .g6, .obs);
endmodule
