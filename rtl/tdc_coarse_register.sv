// tdc_coarse_register: second copy of the coarse count, taken on the
// opposite clock edge to the counter.
//
// The counter advances on the rising edge of the ring tap; this register
// loads the counter state on the falling edge of the same tap, half a ring
// period later, when the counter has long settled. The two copies therefore
// never change at the same time, and at any instant at least one of them is
// stable.
//
// Interface: clk is the counter's clock tap (loaded on its falling edge),
// rst clears the register asynchronously, d is the counter state, q the
// register state. The falling-edge load follows the source design; the
// clear is this design's choice, so that q is defined before its first load.
module tdc_coarse_register
  import tdc_pkg::*;
#(
  parameter int unsigned COARSE_W = TDC_COARSE_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [COARSE_W-1:0] d,
  output logic [COARSE_W-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
