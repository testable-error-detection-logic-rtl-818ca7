// delay_line: the DL1 / DL2 delay elements of the error detection logic.
//
// All timing of the asynchronous detection logic is modelled on a fine reference clock
// clk that stands for elapsed time: one clk tick is the unit of delay. A delay element
// is then a DEPTH-stage shift register, and q repeats d exactly DEPTH ticks later.
// In silicon DL1 and DL2 are analog delay chains; the tick model is this design's choice.
//
// Interface: d in, q out. Reset (synchronous, active high) loads every tap with the
// current d, so leaving reset does not look like a transition on d.
module delay_line #(
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic [DEPTH-1:0] taps;

  logic [DEPTH-1:0] next;  // next[0] = d, next[i] = taps[i-1]

  always_comb begin
    next[0] = d;
    for (int i = 1; i < DEPTH; i++) next[i] = taps[i-1];
  end

  always_ff @(posedge clk) begin
    if (rst) taps <= {DEPTH{d}};
    else     taps <= next[DEPTH-1:0];
  end

  assign q = taps[DEPTH-1];
endmodule
