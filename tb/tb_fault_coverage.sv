// tb_fault_coverage: single stuck-at fault coverage of the TEDL test procedure.
//
// For every fault point listed below (one instance of each kind of net in stage 0 of a
// default-size tedl_top), the net is forced to 0 and then to 1. With the fault present
// the tester procedure is run: with data stable, one latch cycle in each of the modes
// NM, NMTV, TM and TMTV, each followed by a scan capture and readout that is compared
// with the gold patterns of both stages; then every data input is inverted while the
// latches are closed and the four modes are run again (the nets inside the transition
// detector only show a fault for one data value). A fault counts as detected when any
// readout differs from gold. The fault-free design must match gold everywhere.
// Expected result: every fault detected (100 % coverage of the listed points).
// Two faults are also checked for their exact diagnostic pattern (see the end).
// The global tm input is not in the list: with stable data the two paths it selects
// between agree in every mode, so a stuck tm cannot change a readout.
module tb_fault_coverage;
  import tedl_pkg::*;
  localparam int unsigned NS = 2, N_TD = 119, DL1 = 3, DL2 = 2, HIGH = 10;
  localparam int unsigned OB = OBS_BITS, LEN = NS * OB;
  localparam int unsigned N_POINTS = 17;

  logic clk = 0, rst = 1, tm = 0, tv = 0;
  logic [NS-1:0] lclk = '0, sample = '0, err1, err0;
  logic [NS-1:0][N_TD-1:0] din = '0, q;
  tedl_obs_t [NS-1:0] obs;
  logic scan_en = 0, scan_ce = 0, scan_in = 0, scan_out;
  int checks = 0, failures = 0, detected = 0, injected = 0;

  tedl_top dut (.clk, .rst, .tm, .tv, .lclk, .sample, .din, .q, .err1, .err0, .obs,
                .scan_en, .scan_ce, .scan_in, .scan_out);

  always #5 clk = ~clk;

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Fault point names, in the order of the case statements below
  function automatic string point_name(int p);
    case (p)
      0:  return "TD output X (latch 4)";
      1:  return "TD delayed input, DL2 output (latch 4)";
      2:  return "TD inverted delayed input (latch 4)";
      3:  return "TD M1 output (latch 4)";
      4:  return "TD output X of the two-input last slice (latch 118)";
      5:  return "C-element clock after DL1";
      6:  return "C-element output (slice 1)";
      7:  return "G5 output (slice 1)";
      8:  return "M2 output (slice 1)";
      9:  return "G2 output / Q-Flop input (group 0)";
      10: return "G6 output (group 0)";
      11: return "Q-Flop Err1 (group 0)";
      12: return "Q-Flop Err0 (group 0)";
      13: return "Q-Flop Err1 (group 9)";
      14: return "M2 output (slice 39, two inputs)";
      15: return "tv input of stage 0";
      16: return "G5 output (slice 39, two inputs)";
      default: return "?";
    endcase
  endfunction

  task automatic inject(int p, logic v);
    case (p)
      0:  force dut.g_stage[0].u_stage.g_td[4].u_td.x = v;
      1:  force dut.g_stage[0].u_stage.g_td[4].u_td.w16 = v;
      2:  force dut.g_stage[0].u_stage.g_td[4].u_td.w15 = v;
      3:  force dut.g_stage[0].u_stage.g_td[4].u_td.m1 = v;
      4:  force dut.g_stage[0].u_stage.g_td[118].u_td.x = v;
      5:  force dut.g_stage[0].u_stage.ckd = v;
      6:  force dut.g_stage[0].u_stage.g_ce[1].u_slice.w17 = v;
      7:  force dut.g_stage[0].u_stage.g_ce[1].u_slice.g5 = v;
      8:  force dut.g_stage[0].u_stage.g_ce[1].u_slice.m2 = v;
      9:  force dut.g_stage[0].u_stage.g_qf[0].u_grp.w7 = v;
      10: force dut.g_stage[0].u_stage.g_qf[0].u_grp.g6 = v;
      11: force dut.g_stage[0].u_stage.g_qf[0].u_grp.err1 = v;
      12: force dut.g_stage[0].u_stage.g_qf[0].u_grp.err0 = v;
      13: force dut.g_stage[0].u_stage.g_qf[9].u_grp.err1 = v;
      14: force dut.g_stage[0].u_stage.g_ce[39].u_slice.m2 = v;
      15: force dut.g_stage[0].u_stage.tv = v;
      16: force dut.g_stage[0].u_stage.g_ce[39].u_slice.g5 = v;
      default: ;
    endcase
  endtask

  task automatic remove(int p);
    case (p)
      0:  release dut.g_stage[0].u_stage.g_td[4].u_td.x;
      1:  release dut.g_stage[0].u_stage.g_td[4].u_td.w16;
      2:  release dut.g_stage[0].u_stage.g_td[4].u_td.w15;
      3:  release dut.g_stage[0].u_stage.g_td[4].u_td.m1;
      4:  release dut.g_stage[0].u_stage.g_td[118].u_td.x;
      5:  release dut.g_stage[0].u_stage.ckd;
      6:  release dut.g_stage[0].u_stage.g_ce[1].u_slice.w17;
      7:  release dut.g_stage[0].u_stage.g_ce[1].u_slice.g5;
      8:  release dut.g_stage[0].u_stage.g_ce[1].u_slice.m2;
      9:  release dut.g_stage[0].u_stage.g_qf[0].u_grp.w7;
      10: release dut.g_stage[0].u_stage.g_qf[0].u_grp.g6;
      11: release dut.g_stage[0].u_stage.g_qf[0].u_grp.err1;
      12: release dut.g_stage[0].u_stage.g_qf[0].u_grp.err0;
      13: release dut.g_stage[0].u_stage.g_qf[9].u_grp.err1;
      14: release dut.g_stage[0].u_stage.g_ce[39].u_slice.m2;
      15: release dut.g_stage[0].u_stage.tv;
      16: release dut.g_stage[0].u_stage.g_ce[39].u_slice.g5;
      default: ;
    endcase
  endtask

  // One latch cycle in the given mode, then scan capture and readout.
  // Returns the number of readout bits that differ from gold.
  logic [LEN-1:0] word;  // last readout

  task automatic test_cycle(input tedl_mode_e mode, output int diffs);
    logic [LEN-1:0] gold;
    {tm, tv} = mode;
    tick(DL2 + 2);
    lclk = '1;
    tick(HIGH);
    lclk = '0;
    tick(1);
    sample = '1;
    tick(1);
    scan_en = 0; scan_ce = 1; tick(1); scan_ce = 0; tick(1);
    scan_en = 1;
    for (int i = 0; i < LEN; i++) begin
      word[i] = scan_out;
      scan_ce = 1; tick(1); scan_ce = 0; tick(1);
    end
    scan_en = 0;
    sample = '0;
    tick(DL1 + DL2 + 2);
    for (int s = 0; s < NS; s++) gold[s*OB +: OB] = gold_pattern(mode);
    diffs = $countones(word ^ gold);
  endtask

  // Full tester procedure; returns total mismatching bits
  task automatic procedure(output int total);
    int d;
    total = 0;
    for (int phase = 0; phase < 2; phase++) begin
      for (int m = 0; m < 4; m++) begin
        test_cycle(tedl_mode_e'(m), d);
        total += d;
      end
      din = ~din;  // latches closed, far from the next open phase
      tick(DL2 + 2);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < N_TD; i += 32) din[s][i +: 32] = $urandom;
    tick(3);
    rst = 0;
    tick(DL2 + 2);

    procedure(total);
    // a forced rail may break the Q-Flop's own rail assertion: that is the fault
    $assertoff;
    checks++;
    if (total != 0) begin
      failures++;
      $display("fault-free design differs from gold in %0d bits", total);
    end

    for (int p = 0; p < N_POINTS; p++) begin
      for (int v = 0; v < 2; v++) begin
        inject(p, 1'(v));
        rst = 1; tick(2); rst = 0; tick(DL2 + 2);
        procedure(total);
        remove(p);
        injected++;
        checks++;
        if (total != 0) detected++;
        else begin
          failures++;
          $display("undetected: stuck-at-%0d on %s", v, point_name(p));
        end
      end
    end
    // Diagnosis: the exact patterns of two faults. G2 output (w7) stuck at 0 in NMTV:
    // that Q-Flop reports no violation, so w20 stays 0 and w21 rises while the rest of
    // the stage still flags. G6 output (w19) stuck at 1 in NM: w23 rises, w22 stays 0.
    begin
      int d;
      tedl_obs_t got;
      inject(9, 1'b0);
      rst = 1; tick(2); rst = 0; tick(DL2 + 2);
      test_cycle(MODE_NMTV, d);
      got = word[OB-1:0];
      remove(9);
      checks++;
      if (got !== '{w20: 1'b0, w11: 1'b1, w12: 1'b0, w21: 1'b1, w22: 1'b1, w23: 1'b1}) begin
        failures++;
        $display("G2 stuck-at-0: NMTV pattern %b", got);
      end
      inject(10, 1'b1);
      rst = 1; tick(2); rst = 0; tick(DL2 + 2);
      test_cycle(MODE_NM, d);
      got = word[OB-1:0];
      remove(10);
      checks++;
      if (got !== '{w20: 1'b0, w11: 1'b0, w12: 1'b1, w21: 1'b1, w22: 1'b0, w23: 1'b1}) begin
        failures++;
        $display("G6 stuck-at-1: NM pattern %b", got);
      end
    end
    rst = 1; tick(2); rst = 0; tick(DL2 + 2);
    $display("stuck-at faults injected=%0d detected=%0d coverage=%0d%%", injected, detected,
             (100 * detected) / injected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
