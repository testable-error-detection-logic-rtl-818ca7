// tb_q_flop: checks that both rails are 0 while en is low, that d is captured on the
// tick en rises (one tick latency) and held while en stays high even if d changes.
module tb_q_flop;
  logic clk = 0, rst = 1, en = 0, d = 0, err1, err0;
  int checks = 0, failures = 0;

  q_flop dut (.clk, .rst, .en, .d, .err1, .err0);

  always #5 clk = ~clk;

  task automatic expect2(input logic e1, input logic e0, input string what);
    checks++;
    if (err1 !== e1 || err0 !== e0) begin
      failures++;
      $display("%0t %s: err1=%b err0=%b expected %b %b", $time, what, err1, err0, e1, e0);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 40; t++) begin
      en = 0; d = 1'($urandom);
      repeat (2) @(posedge clk);
      #1 expect2(0, 0, "idle");
      v = 1'($urandom);
      d = v; en = 1;
      @(posedge clk); #1;
      expect2(v, ~v, "capture");
      d = ~v;
      repeat (3) @(posedge clk);
      #1 expect2(v, ~v, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
