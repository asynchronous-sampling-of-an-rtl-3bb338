// tdc_top: ring-oscillator time-to-digital converter that can be sampled
// asynchronously, any number of times, while it runs.
//
// A gated ring oscillator (tdc_ring_osc) gives the fine state, one state
// per stage delay, 2*STAGES states per period. Ring tap CLK_TAP clocks a
// ripple counter (tdc_coarse_counter) on its rising edge and a copy
// register (tdc_coarse_register) on its falling edge, so the two coarse
// copies change half a ring period apart. A sample edge, which may come at
// any time, loads the ring outputs and both copies into the sample memory
// (tdc_sample_mem). The stored level of ring tap SEL_TAP then tells which
// copy was stable at the sample edge: the coarse multiplexer
// (tdc_coarse_mux) takes the register copy when the sample fell near the
// counter edge and the counter copy when it fell near the register edge.
// The stored ring outputs are encoded to binary (tdc_fine_encoder).
//
// With the default taps (counter clock F1, select F3) the coarse value
// advances exactly when the fine state wraps from 2*STAGES-1 to 0, so
//   elapsed time = (time_coarse * 2*STAGES + time_fine) * stage delay
// counted from the rising edge of enable, modulo 2**COARSE_W periods.
// The other published arrangement (counter clock F3, select F1,
// SEL_COUNTER = 0) samples equally safely, but its coarse value advances
// when the fine state enters 2 instead of 0.
//
// Interface: reset (active high, asynchronous) clears the counter, the
// register and the sample memory and holds the ring at rest; enable runs
// the ring; every rising edge of sample updates time_coarse/time_fine one
// flip-flop delay later; fine_state shows the live ring outputs.
// Architecture, taps, ring length and stage delay follow the source design;
// widths, resets and the binary encoding are this design's own choices.
module tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned STAGES         = TDC_STAGES,
  parameter int unsigned STAGE_DELAY_PS = TDC_STAGE_DELAY_PS,
  parameter int unsigned COARSE_W       = TDC_COARSE_W,
  parameter int unsigned CLK_TAP        = TDC_CLK_TAP,
  parameter int unsigned SEL_TAP        = TDC_SEL_TAP,
  parameter bit          SEL_COUNTER    = TDC_SEL_COUNTER,
  localparam int unsigned FINE_W        = $clog2(2 * STAGES)
) (
  input  logic                reset,
  input  logic                enable,
  input  logic                sample,
  output logic [STAGES-1:0]   fine_state,
  output logic [COARSE_W-1:0] time_coarse,
  output logic [FINE_W-1:0]   time_fine
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [STAGES-1:0]   f;
  logic [COARSE_W-1:0] counter_state, register_state;
  logic [STAGES-1:0]   f_q;
  logic [COARSE_W-1:0] counter_q, register_q;

  tdc_ring_osc #(
    .STAGES        (STAGES),
    .STAGE_DELAY_PS(STAGE_DELAY_PS)
  ) u_ring (
    .enable(enable),
    .reset (reset),
    .f     (f)
  );

  tdc_coarse_counter #(.COARSE_W(COARSE_W)) u_counter (
    .clk  (f[CLK_TAP]),
    .rst  (reset),
    .count(counter_state)
  );

  tdc_coarse_register #(.COARSE_W(COARSE_W)) u_register (
    .clk(f[CLK_TAP]),
    .rst(reset),
    .d  (counter_state),
    .q  (register_state)
  );

  tdc_sample_mem #(
    .STAGES  (STAGES),
    .COARSE_W(COARSE_W)
  ) u_mem (
    .sample        (sample),
    .rst           (reset),
    .f             (f),
    .counter_state (counter_state),
    .register_state(register_state),
    .f_q           (f_q),
    .counter_q     (counter_q),
    .register_q    (register_q)
  );

  tdc_coarse_mux #(
    .COARSE_W   (COARSE_W),
    .SEL_COUNTER(SEL_COUNTER)
  ) u_mux (
    .sel       (f_q[SEL_TAP]),
    .counter_q (counter_q),
    .register_q(register_q),
    .coarse    (time_coarse)
  );

  tdc_fine_encoder #(.STAGES(STAGES)) u_enc (
    .f   (f_q),
    .fine(time_fine)
  );

  assign fine_state = f;

  initial begin
    if (CLK_TAP >= STAGES || SEL_TAP >= STAGES || CLK_TAP == SEL_TAP)
      $error("tdc_top: CLK_TAP and SEL_TAP must be two different ring stages");
  end
endmodule
