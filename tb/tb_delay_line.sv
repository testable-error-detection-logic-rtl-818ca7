// tb_delay_line: checks that q repeats a random input stream exactly DEPTH ticks later,
// and that leaving reset produces no spurious edge.
module tb_delay_line;
  localparam int unsigned DEPTH = 2;
  logic clk = 0, rst = 1, d = 0, q;
  int checks = 0, failures = 0;
  logic hist [$];

  delay_line #(.DEPTH(DEPTH)) dut (.clk, .rst, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < DEPTH - 1; i++) hist.push_back(1'b1);
    for (int t = 0; t < 300; t++) begin
      d = 1'($urandom);
      @(posedge clk); #1;
      hist.push_back(d);
      checks++;
      if (q !== hist[0]) begin
        failures++;
        $display("t=%0d q=%b expected %b", t, q, hist[0]);
      end
      void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
