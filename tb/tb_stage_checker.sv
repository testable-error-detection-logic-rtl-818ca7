// tb_stage_checker: exhaustive-ish random check of the six reductions, plus the gold
// patterns for all-error and all-clean Q-Flop states.
module tb_stage_checker;
  import tedl_pkg::*;
  localparam int unsigned N_QF = 10;
  logic [N_QF-1:0] err1, err0, g6;
  tedl_obs_t obs, exp;
  int checks = 0, failures = 0;

  stage_checker #(.N_QF(N_QF)) dut (.err1, .err0, .g6, .obs);

  task automatic chk(input string what);
    #1;
    checks++;
    if (obs !== exp) begin
      failures++;
      $display("%s: err1=%b err0=%b g6=%b obs=%b expected %b", what, err1, err0, g6, obs, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // clean stage, no violation injected -> NM gold pattern
    err1 = '0; err0 = '1; g6 = '0; exp = gold_pattern(MODE_NM); chk("NM");
    // every Q-Flop flags, every G6 high -> NMTV gold pattern
    err1 = '1; err0 = '0; g6 = '1; exp = gold_pattern(MODE_NMTV); chk("NMTV");
    for (int t = 0; t < 500; t++) begin
      err1 = N_QF'($urandom);
      err0 = (t % 2) ? ~err1 : N_QF'($urandom);
      g6   = (t % 3 == 0) ? '1 : N_QF'($urandom);
      if (t % 5 == 0) begin
        err1 = '1;
        err1[$urandom % N_QF] = 1'b0;
      end
      exp.w11 = 1'b0; exp.w20 = 1'b1; exp.w12 = 1'b1; exp.w21 = 1'b0;
      exp.w22 = 1'b1; exp.w23 = 1'b0;
      for (int i = 0; i < N_QF; i++) begin
        if (err1[i]) exp.w11 = 1'b1; else exp.w20 = 1'b0;
        if (err0[i]) exp.w21 = 1'b1; else exp.w12 = 1'b0;
        if (g6[i])   exp.w23 = 1'b1; else exp.w22 = 1'b0;
      end
      chk("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
