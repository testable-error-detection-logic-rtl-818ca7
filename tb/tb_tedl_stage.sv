// tb_tedl_stage: one stage of the TEDL at its default size (119 latches).
//
// Runs latch cycles the way a stage controller would: set the mode, raise lclk for
// HIGH ticks, lower it, raise sample, read the six observation outputs, lower sample.
// Checks, against values worked out here:
//   - each of the four modes gives its gold pattern with stable data;
//   - a data transition during the transparent phase (a timing violation) in normal
//     mode is flagged by exactly the Q-Flop that covers that latch;
//   - a transition just before lclk rises is not flagged (DL1 compensation);
//   - the latches pass data while lclk is high and hold it while it is low;
//   - the error rails stay 0 until sample rises and resolve one tick later.
module tb_tedl_stage;
  import tedl_pkg::*;
  localparam int unsigned N_TD = 119, TD_PER_CE = 3, CE_PER_QF = 4, DL1 = 3, DL2 = 2;
  localparam int unsigned N_CE = (N_TD + TD_PER_CE - 1) / TD_PER_CE;
  localparam int unsigned N_QF = (N_CE + CE_PER_QF - 1) / CE_PER_QF;
  localparam int unsigned HIGH = 10;

  logic clk = 0, rst = 1, tm = 0, tv = 0, lclk = 0, sample = 0;
  logic [N_TD-1:0] din = '0, q, held;
  tedl_obs_t obs, exp;
  int checks = 0, failures = 0;

  tedl_stage #(.N_TD(N_TD), .TD_PER_CE(TD_PER_CE), .CE_PER_QF(CE_PER_QF), .DL1(DL1), .DL2(DL2))
    dut (.clk, .rst, .tm, .tv, .lclk, .sample, .din, .q, .obs);

  always #5 clk = ~clk;

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic check_obs(input tedl_obs_t e, input string what);
    checks++;
    if (obs !== e) begin
      failures++;
      $display("%0t %s: obs=%b expected %b", $time, what, obs, e);
    end
  endtask

  // One latch cycle. viol >= 0 toggles din[viol] VT ticks after lclk rises;
  // early >= 0 toggles din[early] one tick before lclk rises.
  task automatic cycle(input tedl_mode_e mode, input int viol, input int early, input string what);
    {tm, tv} = mode;
    tick(DL2 + 2);
    if (early >= 0) begin
      din[early] = ~din[early];
      tick(1);
    end
    lclk = 1;
    tick(1);
    checks++;
    if (q !== din) begin
      failures++;
      $display("%0t latch not transparent", $time);
    end
    tick(DL1 + 1);
    if (viol >= 0) din[viol] = ~din[viol];
    tick(HIGH - DL1 - 2);
    lclk = 0;
    held = q;
    tick(1);
    checks++;
    if (obs.w11 || obs.w12) begin
      failures++;
      $display("%0t rails not idle before sample", $time);
    end
    sample = 1;
    tick(1);
    check_obs(exp, what);
    din = ~din;  // latch is closed: must hold
    tick(2);
    checks++;
    if (q !== held) begin
      failures++;
      $display("%0t latch did not hold", $time);
    end
    din = ~din;
    sample = 0;
    tick(DL1 + DL2 + 2);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_TD; i += 32) din[i +: 32] = $urandom;
    tick(3);
    rst = 0;
    tick(DL2 + 2);
    for (int r = 0; r < 2; r++) begin
      for (int m = 0; m < 4; m++) begin
        exp = gold_pattern(tedl_mode_e'(m));
        cycle(tedl_mode_e'(m), -1, -1, "gold");
      end
    end
    // real timing violations in normal mode, at random latch positions
    for (int t = 0; t < 12; t++) begin
      int i;
      i = (t == 0) ? N_TD - 1 : int'($urandom % N_TD);
      exp = '{w20: (N_QF == 1), w11: 1'b1, w12: 1'b0, w21: (N_QF > 1), w22: 1'b0, w23: 1'b0};
      cycle(MODE_NM, i, -1, $sformatf("violation on latch %0d", i));
    end
    // transitions just before the latch opens are not violations
    for (int t = 0; t < 6; t++) begin
      exp = gold_pattern(MODE_NM);
      cycle(MODE_NM, -1, int'($urandom % N_TD), "early transition");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
