// tdc_sample_mem: the sample memory that freezes the converter's state on
// an asynchronous sample edge.
//
// On each rising edge of sample it stores, all at once, the ring outputs,
// the counter state and the register state. The multiplexer that picks the
// coarse value sits after this memory and is steered by the stored copy of
// the select tap, so a sample edge that coincides with a select transition
// cannot catch the multiplexer half-way. The converter keeps running; the
// memory can be loaded any number of times during one run, like the split
// button of a stopwatch.
//
// Interface: sample is the asynchronous sample clock, rst clears the stored
// values; f, counter_state and register_state are the live values and
// f_q, counter_q and register_q the stored ones. Outputs are valid one
// flip-flop delay after the sample edge and hold until the next one.
// Storing before multiplexing follows the source design; the clear is this
// design's choice.
module tdc_sample_mem
  import tdc_pkg::*;
#(
  parameter int unsigned STAGES   = TDC_STAGES,
  parameter int unsigned COARSE_W = TDC_COARSE_W
) (
  input  logic                sample,
  input  logic                rst,
  input  logic [STAGES-1:0]   f,
  input  logic [COARSE_W-1:0] counter_state,
  input  logic [COARSE_W-1:0] register_state,
  output logic [STAGES-1:0]   f_q,
  output logic [COARSE_W-1:0] counter_q,
  output logic [COARSE_W-1:0] register_q
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [STAGES-1:0] REST = STAGES'(rest_pattern(STAGES));

  always_ff @(posedge sample or posedge rst) begin
    if (rst) begin
      f_q        <= REST;
      counter_q  <= '0;
      register_q <= '0;
    end else begin
      f_q        <= f;
      counter_q  <= counter_state;
      register_q <= register_state;
    end
  end
endmodule
