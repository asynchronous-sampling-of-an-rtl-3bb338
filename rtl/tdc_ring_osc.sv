// tdc_ring_osc: behavioural model of the gated ring oscillator (not
// synthesizable: it is a timed combinational loop that a real chip builds
// from hand-placed gates).
//
// Stage 0 is an AND gate of the enable input and the last stage's output;
// stages 1..STAGES-1 are inverters, each driving the next. With enable low
// the ring rests at F0=0, F1=1, F2=0, F3=1 (fine state 0). When enable rises
// a single edge runs round the ring, one stage per STAGE_DELAY_PS, so the
// outputs step through 2*STAGES states:
//   state  0: 0101   1: 1101   2: 1001   3: 1011   (F0 F1 F2 F3)
//   state  4: 1010   5: 0010   6: 0110   7: 0100
// and back to 0 after 2*STAGES stage delays. Each stage is a transport
// delay, so a disable in mid-flight lets the edges already launched finish
// before the ring settles at rest.
//
// Interface: enable starts the ring; reset holds the AND stage low like a
// low enable (the ring returns to state 0 within STAGES delays); f is the
// vector of stage outputs, f[0] = F0.
// The stage structure, the 4-stage length and the 1 ns delay follow the
// published implementation example; the reset gating and the transport
// delay model are this model's own choices.
module tdc_ring_osc
  import tdc_pkg::*;
#(
  parameter int unsigned STAGES         = TDC_STAGES,
  parameter int unsigned STAGE_DELAY_PS = TDC_STAGE_DELAY_PS
) (
  input  logic              enable,
  input  logic              reset,
  output logic [STAGES-1:0] f
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [STAGES-1:0] REST = STAGES'(rest_pattern(STAGES));

  // One output per stage; stage i is driven only by its own process.
  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    logic out;
    initial out = REST[i];
    if (i == 0) begin : g_and
      // AND gate closing the ring.
      always @(enable, reset, g_stage[STAGES-1].out)
        out <= #(STAGE_DELAY_PS) enable & ~reset & g_stage[STAGES-1].out;
    end else begin : g_inv
      // Inverter.
      always @(g_stage[i-1].out)
        out <= #(STAGE_DELAY_PS) ~g_stage[i-1].out;
    end
    assign f[i] = out;
  end

  initial begin
    if (STAGES < 2 || STAGES[0] != 1'b0)
      $error("tdc_ring_osc: STAGES must be even (AND stage plus an odd number of inverters)");
  end
endmodule
