// tb_tdc_top_fig5b: the converter in its alternative tap arrangement:
// counter and register clocked by F3, multiplexer steered by F1 (the counter
// copy is taken while F1 is low), with a 6-bit coarse counter.
//
// In this arrangement the counter advances when the ring enters state 0
// and the register loads when it enters state 4, and the coarse value seen
// at the output advances when the fine state enters 2 rather than 0. For a
// sample at t0 + k*D + phase (ring in state k) the expected output is
//   fine = k mod 8,  coarse = (k < 2) ? 0 : ((k - 2) / 8) mod 64,
// with k-1 also accepted when phase is 0. As in tb_tdc_top, every sample is
// also checked for having taken the copy whose clock edge is at least two
// stage delays away, and samples near and exactly on both edges, the
// counter's wrap and a restart are counted and must occur.
module tb_tdc_top_fig5b;
  timeunit 1ps;
  timeprecision 1ps;

  localparam longint D        = 1000;  // default stage delay in ps
  localparam longint STATES   = 8;     // fine states per ring period
  localparam int     COARSE_W = 6;
  localparam longint WRAP     = longint'(STATES) << COARSE_W;
  localparam longint CNT_EDGE = 0;     // counter edge: F3 rises, ring enters state 0
  localparam longint REG_EDGE = 4;     // register edge: F3 falls, ring enters state 4

  logic                reset, enable, sample;
  logic [3:0]          fine_state;
  logic [COARSE_W-1:0] time_coarse;
  logic [2:0]          time_fine;

  tdc_top #(
    .COARSE_W   (COARSE_W),
    .CLK_TAP    (3),
    .SEL_TAP    (1),
    .SEL_COUNTER(1'b0)
  ) dut (
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

  // Expected coarse*8 + fine for ring state count k.
  function automatic longint expected(input longint k);
    longint c;
    c = (k < 2) ? 0 : ((k - 2) / STATES) % (longint'(1) << COARSE_W);
    return c * STATES + k % STATES;
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
    exp_n    = expected(k);
    exp_prev = expected(k - 1);
    check(meas == exp_n || (phase == 0 && meas == exp_prev),
          $sformatf("sample k=%0d phase=%0d: read %0d (coarse %0d fine %0d), expected %0d",
                    k, phase, meas, time_coarse, time_fine, exp_n));
    took_counter = (dut.f_q[1] == 1'b0);
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
    if (phase == 0 && k >= STATES && k % STATES == CNT_EDGE) n_exact_cnt++;
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
