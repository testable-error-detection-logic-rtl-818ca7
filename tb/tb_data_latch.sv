// tb_data_latch: q follows d while en is high and holds while en is low.
module tb_data_latch;
  localparam int unsigned WIDTH = 119;
  logic clk = 0, rst = 1, en = 0;
  logic [WIDTH-1:0] d = '0, q, ref_q = '0;
  int checks = 0, failures = 0;

  data_latch #(.WIDTH(WIDTH)) dut (.clk, .rst, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 400; t++) begin
      en = ($urandom % 3) != 0;
      for (int i = 0; i < WIDTH; i += 32) d[i +: 32] = $urandom;
      @(posedge clk);
      if (en) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("%0t en=%b mismatch", $time, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
