// tdc_pkg: shared constants of the asynchronously sampled ring-oscillator TDC.
//
// The converter is a ring of STAGES stages (one AND gate that is gated by
// the enable input, followed by STAGES-1 inverters). Such a ring walks
// through 2*STAGES fine states per period, one state per stage delay. A
// ripple counter clocked by one ring tap extends the range, a register
// copies the counter on the opposite edge of that tap, and a second tap
// tells, at the sample edge, which of the two copies was stable.
//
// The numbers below are the defaults of every module: a 4-stage ring
// (8 fine states) with a 1 ns stage delay, the counter clocked by F1 and the
// multiplexer steered by F3, follow the published implementation example.
// The coarse counter width is this design's own choice.
package tdc_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Ring length: one AND stage plus three inverters.
  localparam int unsigned TDC_STAGES         = 4;
  // Delay of one ring stage, i.e. the fine resolution, in picoseconds.
  localparam int unsigned TDC_STAGE_DELAY_PS = 1000;
  // Width of the coarse (ripple) counter.
  localparam int unsigned TDC_COARSE_W       = 12;
  // Ring tap that clocks the counter (rising edge) and the register
  // (falling edge).
  localparam int unsigned TDC_CLK_TAP        = 1;
  // Ring tap that steers the coarse multiplexer.
  localparam int unsigned TDC_SEL_TAP        = 3;
  // Level of the stored select tap for which the counter copy is taken.
  localparam bit          TDC_SEL_COUNTER    = 1'b1;

  // Width of the binary fine state for a ring of the given length.
  function automatic int unsigned fine_width(int unsigned stages);
    return $clog2(2 * stages);
  endfunction

  // Output level of every ring stage while the ring is held at rest
  // (enable low): the AND stage is low and the inverters alternate.
  function automatic logic [31:0] rest_pattern(int unsigned stages);
    logic [31:0] p;
    p = '0;
    for (int unsigned i = 0; i < stages && i < 32; i++) p[i] = i[0];
    return p;
  endfunction
endpackage
