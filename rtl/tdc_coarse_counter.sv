// tdc_coarse_counter: ripple counter that extends the range of the ring
// oscillator by counting its periods.
//
// Bit 0 toggles on every rising edge of clk (a ring tap); bit i toggles on
// every falling edge of bit i-1, so the count ripples up through the bits
// and settles some time after the clock edge. That settling time is the
// reason the converter keeps a second copy of the count (see
// tdc_coarse_register): a sample taken while the count is rippling would be
// wrong by a whole ring period or more.
//
// Interface: clk is the oscillator tap, rst clears all bits at once
// (asynchronous), count is the counter state, wrapping modulo 2**COARSE_W.
// A ripple counter is the example the source design names; the width and
// the asynchronous clear are this design's own choices. The ripple clocks
// are deliberate: each bit is clocked by the bit below it.
module tdc_coarse_counter
  import tdc_pkg::*;
#(
  parameter int unsigned COARSE_W = TDC_COARSE_W
) (
  input  logic                clk,
  input  logic                rst,
  output logic [COARSE_W-1:0] count
);
  timeunit 1ps;
  timeprecision 1ps;

  // Each bit is its own flip-flop, clocked by the bit below it.
  for (genvar i = 0; i < COARSE_W; i++) begin : g_bit
    logic q;
    if (i == 0) begin : g_first
      always_ff @(posedge clk or posedge rst) begin
        if (rst) q <= 1'b0;
        else     q <= ~q;
      end
    end else begin : g_ripple
      always_ff @(negedge g_bit[i-1].q or posedge rst) begin
        if (rst) q <= 1'b0;
        else     q <= ~q;
      end
    end
    assign count[i] = q;
  end
endmodule
