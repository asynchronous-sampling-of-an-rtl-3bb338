// tb_tdc_top: end-to-end test of the converter at its default size
// (4-stage ring, 1 ns stages, 12-bit coarse counter, counter clock F1,
// select F3).
//
// The ring starts when enable rises at t0 and enters fine state k at
// t0 + k*D (D = stage delay), so a sample edge at t0 + k*D + phase must read
// the elapsed state count k (k or k-1 when phase is 0, i.e. when the sample
// coincides with a ring transition), modulo 8 * 2**12 = 32768. The test
// draws sample times at random, with extra samples aimed exactly at the
// counter edge (ring enters state 6) and at the register edge (ring enters
// state 2), and for every sample checks:
//   - time_coarse*8 + time_fine against k;
//   - that the multiplexer took the copy whose own clock edge is at least
//     two stage delays away from the sample edge, and that this copy really
//     did not change from 2 stage delays before to 2 after the sample.
// One run goes past the coarse counter's wrap; then the ring is stopped,
// reset and run again. Each mechanism (sample near the counter edge,
// sample near the register edge, exact coincidences, wrap, restart) is
// counted and must occur.
module tb_tdc_top;
  timeunit 1ps;
  timeprecision 1ps;

  localparam longint D        = 1000;  // default stage delay in ps
  localparam longint STATES   = 8;     // fine states per ring period
  localparam int     COARSE_W = 12;
  localparam longint WRAP     = longint'(STATES) << COARSE_W;
  localparam longint CNT_EDGE = 6;     // counter edge: F1 rises, ring enters state 6
  localparam longint REG_EDGE = 2;     // register edge: F1 falls, ring enters state 2

  logic                reset, enable, sample;
  logic [3:0]          fine_state;
  logic [COARSE_W-1:0] time_coarse;
  logic [2:0]          time_fine;

  tdc_top dut (
    .reset      (reset),
    .enable     (enable),
    .sample     (sample),
    .fine_state (fine_state),
    .time_coarse(time_coarse),
    .time_fine  (time_fine)
  );

  int checks = 0, failures = 0;
  int n_samples = 0, n_near_cnt = 0, n_near_reg = 0, n_exact_cnt = 0, n_exact_reg = 0;
  int n_wrap = 0, n_restart = 0;

  longint last_cnt_change = 0, last_reg_change = 0;
  always @(dut.counter_state)  last_cnt_change = longint'($time);
  always @(dut.register_state) last_reg_change = longint'($time);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, msg);
    end
  endtask

  // Distance from pos to the nearest time (STATES*m + e)*D.
  function automatic longint edge_dist(input longint pos, input longint e);
    longint per, r;
    per = STATES * D;
    r   = ((pos - e * D) % per + per) % per;
    return (r < per - r) ? r : per - r;
  endfunction

  // Take one sample at t0 + k*D + phase and check it.
  task automatic take_sample(input longint t0, input longint k, input longint phase,
                             inout longint prev_coarse);
    longint ts, pos, meas, exp_n, exp_prev, gap_ps, last_change;
    bit     took_counter;
    ts = t0 + k * D + phase;
    #(ts - longint'($time));
    sample = 1'b1;
    #1;
    n_samples++;
    meas     = longint'(time_coarse) * STATES + longint'(time_fine);
    exp_n    = k % WRAP;
    exp_prev = (k - 1 + WRAP) % WRAP;
    check(meas == exp_n || (phase == 0 && meas == exp_prev),
          $sformatf("sample k=%0d phase=%0d: read %0d (coarse %0d fine %0d), expected %0d",
                    k, phase, meas, time_coarse, time_fine, exp_n));
    took_counter = dut.f_q[3];
    pos  = k * D + phase;
    gap_ps = edge_dist(pos, took_counter ? CNT_EDGE : REG_EDGE);
    check(gap_ps >= 2 * D, $sformatf("k=%0d phase=%0d: took a copy whose edge is %0d ps away",
                                   k, phase, gap_ps));
    if (edge_dist(pos, CNT_EDGE) <= D) begin
      n_near_cnt++;
      check(!took_counter, "sample near the counter edge did not take the register copy");
    end
    if (edge_dist(pos, REG_EDGE) <= D) begin
      n_near_reg++;
      check(took_counter, "sample near the register edge did not take the counter copy");
    end
    if (phase == 0 && k % STATES == CNT_EDGE) n_exact_cnt++;
    if (phase == 0 && k % STATES == REG_EDGE) n_exact_reg++;
    if (exp_n / STATES < prev_coarse) n_wrap++;
    prev_coarse = exp_n / STATES;
    #(D / 2);
    sample = 1'b0;
    // The chosen copy must stay still until 2 stage delays after the edge.
    #(ts + 2 * D - 1 - longint'($time));
    last_change = took_counter ? last_cnt_change : last_reg_change;
    check(last_change <= ts - 2 * D,
          $sformatf("k=%0d: chosen copy changed at %0d ps, sample at %0d ps", k, last_change, ts));
  endtask

  // One run: start the ring, sample until at least 'states' states passed.
  task automatic run(input longint states);
    longint t0, k, phase, prev_coarse;
    int     r;
    t0 = longint'($time);
    enable = 1'b1;
    k = 0;
    prev_coarse = 0;
    while (k < states) begin
      k += 3 + longint'($urandom_range(37));
      r = int'($urandom_range(9));
      case (r)
        0: begin  // exactly on a counter edge
          while (k % STATES != CNT_EDGE) k++;
          phase = 0;
        end
        1: begin  // exactly on a register edge
          while (k % STATES != REG_EDGE) k++;
          phase = 0;
        end
        2:       phase = 0;
        3:       phase = 1;
        4:       phase = D - 1;
        default: phase = longint'($urandom_range(int'(D) - 1));
      endcase
      take_sample(t0, k, phase, prev_coarse);
    end
  endtask

  initial begin
    reset  = 1'b0;
    enable = 1'b0;
    sample = 1'b0;
    #1;
    reset = 1'b1;
    #20000;
    check(time_coarse == '0 && time_fine == '0, "outputs not cleared by reset");
    check(fine_state == 4'b1010, "ring not at rest (F0..F3 = 0101) during reset");
    reset = 1'b0;
    #5000;

    // Run 1: past the coarse counter's wrap.
    run(WRAP + 600);
    enable = 1'b0;
    #(3 * STATES * D);
    check(fine_state == 4'b1010, "ring did not return to rest after enable fell");

    // Reset and run again.
    reset = 1'b1;
    #5000;
    check(time_coarse == '0 && time_fine == '0, "outputs not cleared by the second reset");
    reset = 1'b0;
    #5000;
    run(2000);
    n_restart++;

    check(n_samples > 1,   "fewer than two samples in a run");
    check(n_near_cnt > 0,  "no sample near a counter edge");
    check(n_near_reg > 0,  "no sample near a register edge");
    check(n_exact_cnt > 0, "no sample exactly on a counter edge");
    check(n_exact_reg > 0, "no sample exactly on a register edge");
    check(n_wrap > 0,      "coarse counter never wrapped");
    check(n_restart > 0,   "no restart after reset");
    $display("samples=%0d near_counter_edge=%0d near_register_edge=%0d exact_counter=%0d exact_register=%0d wraps=%0d restarts=%0d",
             n_samples, n_near_cnt, n_near_reg, n_exact_cnt, n_exact_reg, n_wrap, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 200 us of simulated time.
  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
