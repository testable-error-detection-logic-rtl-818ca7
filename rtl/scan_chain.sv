// scan_chain: MUX-D scan chain that makes the TEDL observation outputs readable.
//
// LEN scan flops, each a D flop behind a 2:1 mux. On a scan clock pulse (ce high for
// one clk tick) with scan_en low, every flop loads its parallel input pin[i] (capture);
// with scan_en high the chain shifts one place towards scan_out, and the last flop
// loads scan_in. pin[0] sits next to scan_out and leaves first; after a capture, LEN
// shift pulses bring out pin[0], pin[1], ... pin[LEN-1] in that order, and scan_out
// shows the next bit right after each pulse.
//
// The MUX-D style is the design description's; the bit order, the ce pulse standing in
// for the test clock and the reset to 0 are this design's choices.
module scan_chain #(
  parameter int unsigned LEN = 12
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           ce,
  input  logic           scan_en,
  input  logic           scan_in,
  input  logic [LEN-1:0] pin,
  output logic           scan_out
);
  logic [LEN-1:0] sff;

  always_ff @(posedge clk) begin
    if (rst)         sff <= '0;
    else if (ce) begin
      if (scan_en)   sff <= {scan_in, sff[LEN-1:1]};
      else           sff <= pin;
    end
  end

  assign scan_out = sff[0];
endmodule
