// tb_celem_slice: checks the M2 selection by tm between G5 (AND of x) and the C-element,
// against an independent reference, with random stimulus.
module tb_celem_slice;
  localparam int unsigned NX = 3;
  logic clk = 0, rst = 1, ckd = 0, tm = 0, m2;
  logic [NX-1:0] x = '0;
  logic ref_c = 0;
  int checks = 0, failures = 0;

  celem_slice #(.NX(NX)) dut (.clk, .rst, .ckd, .tm, .x, .m2);

  always #5 clk = ~clk;

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
    for (int t = 0; t < 800; t++) begin
      ckd = ($urandom % 4) != 0;
      tm  = 1'($urandom);
      x   = (($urandom % 3) == 0) ? '1 : NX'(($urandom % 4 == 0) ? $urandom : 0);
      #1;
      checks++;
      if (m2 !== (tm ? (&x) : ref_c)) begin
        failures++;
        $display("%0t tm=%b x=%b m2=%b ref_c=%b", $time, tm, x, m2, ref_c);
      end
      @(posedge clk);
      ref_c = (!ckd) ? 1'b0 : (ref_c | (|x));
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
