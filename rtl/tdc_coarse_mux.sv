// tdc_coarse_mux: picks the stable one of the two stored coarse copies.
//
// The select input is a ring tap stored at the sample edge. The tap is
// chosen so that its level tells in which half of the ring period the
// sample fell: in the half around the counter's clock edge it selects the
// register copy, and in the half around the register's load edge it selects
// the counter copy. SEL_COUNTER is the select level for which the counter
// copy is taken (1 for the default taps: select F3, counter clocked by F1).
//
// Interface: purely combinational, sel, counter_q and register_q in,
// coarse out.
module tdc_coarse_mux
  import tdc_pkg::*;
#(
  parameter int unsigned COARSE_W    = TDC_COARSE_W,
  parameter bit          SEL_COUNTER = TDC_SEL_COUNTER
) (
  input  logic                sel,
  input  logic [COARSE_W-1:0] counter_q,
  input  logic [COARSE_W-1:0] register_q,
  output logic [COARSE_W-1:0] coarse
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    if (sel == SEL_COUNTER) coarse = counter_q;
    else                    coarse = register_q;
  end
endmodule
