// tedl_top: testable error detection logic (TEDL) of a two-controller Blade design.
//
// A timing-resilient Blade pipeline replaces its critical latches by error-detecting
// latches: a transition detector (TD) on each latch input, asymmetric C-elements that
// remember a transition seen while the latch is transparent, and Q-Flops that turn it
// into a dual-rail error (Err1/Err0) for the stage controller. The TEDL adds two global
// test inputs and concurrent checkers so that every single stuck-at fault inside this
// logic shows up as a wrong observation pattern:
//   tv forces every TD output high (an injected timing violation),
//   tm sends the AND checker G5 instead of the C-element to the Q-Flop.
// Each stage's six observation outputs (w20, w11, w12, w21, w22, w23) are captured by a
// MUX-D scan chain; a tester steps through the four modes NM, NMTV, TM, TMTV with the
// pipeline full and stable and compares each captured pattern with the gold pattern.
//
// Defaults are the case study's: 2 stages (controller groups) of 119 monitored latches,
// 3 TDs per C-element, 4 C-elements per Q-Flop, i.e. 238 TDs, 80 C-elements and
// 20 Q-Flops. The Blade controllers and the datapath are outside: their latch clocks
// (lclk), Q-Flop enables (sample), data (din, q) and error rails (err1, err0) are ports.
//
// Scan chain: 6 bits per stage, stage 0 nearest scan_out, bits in tedl_obs_t order
// starting with w23 (the last field, bit 0) of stage 0.
// All timing is on the reference clock clk (one tick = one unit of delay); DL1 and DL2
// are in ticks. The tick model and the delay values are this design's choices.
module tedl_top #(
  parameter int unsigned N_STAGES  = 2,
  parameter int unsigned N_TD      = 119,
  parameter int unsigned TD_PER_CE = 3,
  parameter int unsigned CE_PER_QF = 4,
  parameter int unsigned DL1       = 3,
  parameter int unsigned DL2       = 2
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic                                 tm,
  input  logic                                 tv,
  input  logic [N_STAGES-1:0]                  lclk,
  input  logic [N_STAGES-1:0]                  sample,
  input  logic [N_STAGES-1:0][N_TD-1:0]        din,
  output logic [N_STAGES-1:0][N_TD-1:0]        q,
  output logic [N_STAGES-1:0]                  err1,
  output logic [N_STAGES-1:0]                  err0,
  output tedl_pkg::tedl_obs_t [N_STAGES-1:0]   obs,
  input  logic                                 scan_en,
  input  logic                                 scan_ce,
  input  logic                                 scan_in,
  output logic                                 scan_out
);
  localparam int unsigned OB = tedl_pkg::OBS_BITS;

  for (genvar s = 0; s < N_STAGES; s++) begin : g_stage
    tedl_stage #(
      .N_TD(N_TD), .TD_PER_CE(TD_PER_CE), .CE_PER_QF(CE_PER_QF), .DL1(DL1), .DL2(DL2)
    ) u_stage (
      .clk, .rst, .tm, .tv, .lclk(lclk[s]), .sample(sample[s]),
      .din(din[s]), .q(q[s]), .obs(obs[s])
    );
    assign err1[s] = obs[s].w11;
    assign err0[s] = obs[s].w12;
  end

  scan_chain #(.LEN(N_STAGES * OB)) u_scan (
    .clk, .rst, .ce(scan_ce), .scan_en, .scan_in, .pin(obs), .scan_out
  );
endmodule
