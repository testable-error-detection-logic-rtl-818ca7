// tb_qflop_group: checks G6 = AND of m2 and that the Q-Flop captures G2 = OR of m2
// when sample rises, for random inputs.
module tb_qflop_group;
  localparam int unsigned N_CE = 4;
  logic clk = 0, rst = 1, sample = 0, err1, err0, g6;
  logic [N_CE-1:0] m2 = '0;
  int checks = 0, failures = 0;

  qflop_group #(.N_CE(N_CE)) dut (.clk, .rst, .sample, .m2, .err1, .err0, .g6);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 100; t++) begin
      sample = 0;
      case ($urandom % 4)
        0:       m2 = '0;
        1:       m2 = '1;
        2:       m2 = N_CE'(1) << ($urandom % N_CE);
        default: m2 = N_CE'($urandom);
      endcase
      e  = |m2;
      #1;
      checks++;
      if (g6 !== (&m2)) begin
        failures++;
        $display("m2=%b g6=%b", m2, g6);
      end
      @(posedge clk); #1;
      sample = 1;
      @(posedge clk); #1;
      checks++;
      if (err1 !== e || err0 !== ~e) begin
        failures++;
        $display("m2=%b err1=%b err0=%b", m2, err1, err0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
