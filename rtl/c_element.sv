// c_element: asymmetric C-element that remembers a timing violation.
//
// While the (DL1-delayed) latch clock ckd is low the element is cleared. While ckd is
// high it is set as soon as any transition-detector output x is high, and then holds
// 1 until ckd falls. It therefore stores any data transition seen during the latch's
// transparent phase, i.e. a timing violation.
//
// Behaviour per the design description; modelled on the reference clock clk, so c
// reflects the inputs one tick later (this design's time model). Reset clears it.
module c_element #(
  parameter int unsigned NX = 3
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ckd,
  input  logic [NX-1:0] x,
  output logic          c
);
  always_ff @(posedge clk) begin
    if (rst || !ckd) c <= 1'b0;
    else if (|x)     c <= 1'b1;
  end
endmodule
