// tb_scan_chain: capture a random parallel word, shift it out while shifting a second
// word in, and check both bit streams and that nothing moves without ce.
module tb_scan_chain;
  localparam int unsigned LEN = 12;
  logic clk = 0, rst = 1, ce = 0, scan_en = 0, scan_in = 0, scan_out;
  logic [LEN-1:0] pin = '0, word_in, got;
  int checks = 0, failures = 0;

  scan_chain #(.LEN(LEN)) dut (.clk, .rst, .ce, .scan_en, .scan_in, .pin, .scan_out);

  always #5 clk = ~clk;

  task automatic pulse(input logic se);
    scan_en = se; ce = 1;
    @(posedge clk); #1;
    ce = 0;
    repeat (2) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 20; t++) begin
      pin = LEN'($urandom);
      word_in = LEN'($urandom);
      pulse(0);
      pin = ~pin;  // must not disturb the captured word while shifting
      for (int i = 0; i < LEN; i++) begin
        got[i] = scan_out;
        scan_in = word_in[i];
        pulse(1);
      end
      checks++;
      if (got !== ~pin) begin
        failures++;
        $display("captured %h expected %h", got, ~pin);
      end
      for (int i = 0; i < LEN; i++) begin
        got[i] = scan_out;
        scan_in = 0;
        pulse(1);
      end
      checks++;
      if (got !== word_in) begin
        failures++;
        $display("shifted %h expected %h", got, word_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
