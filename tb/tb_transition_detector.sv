// tb_transition_detector: drives din with random transitions for both tv values and
// compares x with din XOR (din DL2 ticks ago, inverted when tv = 1). Also checks the
// pulse width after an isolated transition and that x stays high with tv = 1 and din
// stable.
module tb_transition_detector;
  localparam int unsigned DL2 = 2;
  logic clk = 0, rst = 1, tv = 0, din = 0, x;
  int checks = 0, failures = 0;
  logic hist [$];
  int pulse;

  transition_detector #(.DL2(DL2)) dut (.clk, .rst, .tv, .din, .x);

  always #5 clk = ~clk;

  task automatic chk(input logic exp, input string what);
    checks++;
    if (x !== exp) begin
      failures++;
      $display("%0t %s: x=%b expected %b", $time, what, x, exp);
    end
  endtask

  // advance one tick with a new din, keeping a reference history
  task automatic step(input logic nd);
    din = nd;
    #1;
    chk(din ^ (hist[0] ^ tv), "comb");
    @(posedge clk); #1;
    hist.push_back(nd);
    void'(hist.pop_front());
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < DL2; i++) hist.push_back(1'b0);
    for (int m = 0; m < 2; m++) begin
      tv = m[0];
      for (int t = 0; t < 200; t++) step(1'($urandom));
      // isolated transition: count pulse width
      for (int t = 0; t < 6; t++) step(din);
      chk(tv, "stable");
      step(~din);
      pulse = 0;
      for (int t = 0; t < 8; t++) begin
        if (x != tv) pulse++;
        step(din);
      end
      // the step that makes the transition already saw one tick of the pulse
      checks++;
      if (pulse + 1 != DL2) begin
        failures++;
        $display("pulse width %0d expected %0d (tv=%0b)", pulse + 1, DL2, tv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
