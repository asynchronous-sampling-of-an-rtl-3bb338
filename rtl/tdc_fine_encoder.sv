// tdc_fine_encoder: turns the stored ring outputs into a binary fine state.
//
// The ring outputs form a Johnson-like code: XOR-ing them with the rest
// pattern (0101... for F0 F1 F2 ...) gives a word t in which the first s
// stages are set in states s = 0..STAGES, and the stages s-STAGES..STAGES-1
// are set in states s = STAGES..2*STAGES-1. So with p = number of ones in t:
//   fine = p              when the last stage of t is 0,
//   fine = 2*STAGES - p   when it is 1.
// For the 4-stage ring this maps 0101,1101,1001,1011,1010,0010,0110,0100
// (F0 F1 F2 F3) to 0..7. Words outside the code, which occur only while a
// stopped ring drains, are encoded by the same rule.
//
// Interface: purely combinational, f in (f[0] = F0), fine out.
// The encoding is this design's own; the source design only states that all
// ring states are defined and can be encoded.
module tdc_fine_encoder
  import tdc_pkg::*;
#(
  parameter int unsigned STAGES = TDC_STAGES,
  localparam int unsigned FINE_W = $clog2(2 * STAGES)
) (
  input  logic [STAGES-1:0] f,
  output logic [FINE_W-1:0] fine
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [STAGES-1:0] REST = STAGES'(rest_pattern(STAGES));

  logic [STAGES-1:0] t;
  logic [FINE_W:0]   ones;

  always_comb begin
    t    = f ^ REST;
    ones = '0;
    for (int unsigned i = 0; i < STAGES; i++) ones = ones + (FINE_W+1)'(t[i]);
    if (t[STAGES-1]) fine = FINE_W'((FINE_W+1)'(2 * STAGES) - ones);
    else             fine = FINE_W'(ones);
  end
endmodule
