// tb_c_element: random ckd / x stimulus against a reference of the asymmetric C-element
// (cleared while ckd is low, set by any x while ckd is high, else hold), plus directed
// checks that a single x input sets it and that it holds after x falls.
module tb_c_element;
  localparam int unsigned NX = 3;
  logic clk = 0, rst = 1, ckd = 0, c;
  logic [NX-1:0] x = '0;
  logic ref_c = 0;
  int checks = 0, failures = 0;

  c_element #(.NX(NX)) dut (.clk, .rst, .ckd, .x, .c);

  always #5 clk = ~clk;

  task automatic tick(input logic nckd, input logic [NX-1:0] nx);
    ckd = nckd; x = nx;
    @(posedge clk);
    ref_c = (!ckd) ? 1'b0 : (ref_c | (|x));
    #1;
    checks++;
    if (c !== ref_c) begin
      failures++;
      $display("%0t ckd=%b x=%b c=%b expected %b", $time, ckd, x, c, ref_c);
    end
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
    for (int i = 0; i < NX; i++) begin
      tick(1, '0);
      tick(1, NX'(1) << i);   // one input sets it
      tick(1, '0);            // holds
      tick(0, '0);            // clears
      tick(0, NX'(1) << i);   // does not set while ckd low
    end
    for (int t = 0; t < 500; t++) tick(($urandom % 4) != 0, NX'(($urandom % 5 == 0) ? $urandom : 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
