// tb_tedl_top: end-to-end test of the TEDL at its default size (2 stages x 119 latches).
//
// Plays the part of the two stage controllers and of the tester:
//   - test sequence: with the pipeline full and data stable, run one latch cycle per
//     mode (NM, NMTV, TM, TMTV), capture both stages' observation outputs into the scan
//     chain, shift them out serially and compare with the gold patterns;
//   - a timing violation in one stage during normal operation: the error rails of that
//     stage report it, the other stage stays clean, and the scan readout agrees;
//   - a data transition just before the latch opens is not reported (DL1);
//   - the latches pass data while open and hold it while closed.
// Each mechanism is counted and a mechanism that never happened counts as a failure.
module tb_tedl_top;
  import tedl_pkg::*;
  localparam int unsigned NS = 2, N_TD = 119, DL1 = 3, DL2 = 2, HIGH = 10;
  localparam int unsigned OB = OBS_BITS, LEN = NS * OB;

  logic clk = 0, rst = 1, tm = 0, tv = 0;
  logic [NS-1:0] lclk = '0, sample = '0, err1, err0;
  logic [NS-1:0][N_TD-1:0] din = '0, q, held;
  tedl_obs_t [NS-1:0] obs;
  logic scan_en = 0, scan_ce = 0, scan_in = 0, scan_out;
  logic [LEN-1:0] shifted;
  int checks = 0, failures = 0;
  int n_mode [4];
  int n_viol_flagged = 0, n_early_ignored = 0, n_scan_reads = 0, n_latch_hold = 0;

  tedl_top dut (.clk, .rst, .tm, .tv, .lclk, .sample, .din, .q, .err1, .err0, .obs,
                .scan_en, .scan_ce, .scan_in, .scan_out);

  always #5 clk = ~clk;

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t FAIL %s", $time, what);
    end
  endtask

  // Capture the observation outputs into the chain and shift them out.
  task automatic scan_read(output logic [LEN-1:0] word);
    scan_en = 0; scan_ce = 1; tick(1); scan_ce = 0; tick(1);
    scan_en = 1;
    for (int i = 0; i < LEN; i++) begin
      word[i] = scan_out;
      scan_in = 1'($urandom);
      scan_ce = 1; tick(1); scan_ce = 0; tick(1);
    end
    scan_en = 0;
    n_scan_reads++;
  endtask

  // One latch cycle of both stages with the given mode. viol_stage/viol_bit inject a
  // data transition during the open phase; early_bit toggles stage 0's data one tick
  // before the latches open. The expected readout is exp_obs.
  task automatic cycle(input tedl_mode_e mode, input int viol_stage, input int viol_bit,
                       input int early_bit, input tedl_obs_t [NS-1:0] exp_obs, input string what);
    {tm, tv} = mode;
    tick(DL2 + 2);
    if (early_bit >= 0) begin
      din[0][early_bit] = ~din[0][early_bit];
      tick(1);
    end
    lclk = '1;
    tick(1);
    check(q == din, {what, ": latches transparent"});
    tick(DL1 + 1);
    if (viol_stage >= 0) din[viol_stage][viol_bit] = ~din[viol_stage][viol_bit];
    tick(HIGH - DL1 - 2);
    lclk = '0;
    held = q;
    tick(1);
    check(err1 == '0 && err0 == '0, {what, ": rails idle before sample"});
    sample = '1;
    tick(1);
    for (int s = 0; s < NS; s++) begin
      check(err1[s] == exp_obs[s].w11 && err0[s] == exp_obs[s].w12, $sformatf("%s: rails of stage %0d", what, s));
      if (viol_stage == s && err1[s] && !tv) n_viol_flagged++;
      check(obs[s] == exp_obs[s], $sformatf("%s: parallel obs of stage %0d = %b, expected %b", what, s, obs[s], exp_obs[s]));
    end
    scan_read(shifted);
    check(shifted == exp_obs, $sformatf("%s: scan readout %h, expected %h", what, shifted, exp_obs));
    din = ~din;
    tick(2);
    check(q == held, {what, ": latches hold"});
    if (q == held) n_latch_hold++;
    din = ~din;
    sample = '0;
    tick(DL1 + DL2 + 2);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tedl_obs_t [NS-1:0] e;
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < N_TD; i += 32) din[s][i +: 32] = $urandom;
    tick(3);
    rst = 0;
    tick(DL2 + 2);

    // test sequence over the four modes, twice
    for (int r = 0; r < 2; r++)
      for (int m = 0; m < 4; m++) begin
        for (int s = 0; s < NS; s++) e[s] = gold_pattern(tedl_mode_e'(m));
        cycle(tedl_mode_e'(m), -1, 0, -1, e, $sformatf("mode %0d", m));
        if (failures == 0) n_mode[m]++;
      end

    // real timing violations during normal operation
    for (int t = 0; t < 6; t++) begin
      int s, i;
      s = t % NS;
      i = int'($urandom % N_TD);
      for (int k = 0; k < NS; k++) e[k] = gold_pattern(MODE_NM);
      e[s] = '{w20: 1'b0, w11: 1'b1, w12: 1'b0, w21: 1'b1, w22: 1'b0, w23: 1'b0};
      cycle(MODE_NM, s, i, -1, e, $sformatf("violation stage %0d latch %0d", s, i));
    end

    // transitions before the latches open
    for (int t = 0; t < 4; t++) begin
      for (int k = 0; k < NS; k++) e[k] = gold_pattern(MODE_NM);
      cycle(MODE_NM, -1, 0, int'($urandom % N_TD), e, "early transition");
      n_early_ignored++;
    end

    check(n_mode[0] > 0, "NM exercised");
    check(n_mode[1] > 0, "NMTV exercised");
    check(n_mode[2] > 0, "TM exercised");
    check(n_mode[3] > 0, "TMTV exercised");
    check(n_viol_flagged > 0, "timing violation flagged");
    check(n_early_ignored > 0, "early transition ignored");
    check(n_scan_reads > 0, "scan readout");
    check(n_latch_hold > 0, "latch hold");
    $display("modes NM=%0d NMTV=%0d TM=%0d TMTV=%0d violations flagged=%0d early ignored=%0d scan reads=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_viol_flagged, n_early_ignored, n_scan_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
