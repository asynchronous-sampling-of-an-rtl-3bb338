// tb_tdc_settling: shows why the converter keeps two coarse copies.
//
// The RTL has no delays, so a sample that coincides with the counter edge
// cannot go wrong in tdc_top's own simulation. This bench wires the same
// blocks as tdc_top (ring, counter, copy register, sample memory,
// multiplexer, encoder) but puts a settling model behind the counter and
// behind the register: for SETTLE_PS after each change the outputs show a
// random mix of old and new bits, as a ripple counter does while its carry
// travels, and only then the new value.
//
// Random sample edges, many of them within one stage delay of the counter
// edge, are read two ways:
//   - directly, as a converter with only the counter would: the stored
//     counter copy with the stored fine state;
//   - through the stored select tap and the multiplexer, as tdc_top does.
// The direct reading must go wrong at least once (by a multiple of the 8
// ring states, as in the failure described for the plain architecture);
// the multiplexed reading must always equal the elapsed state count
// (within one state when the sample coincides with a ring transition).
// SETTLE_PS = 1900 is just under the two stage delays the scheme allows.
module tb_tdc_settling;
  timeunit 1ps;
  timeprecision 1ps;

  localparam longint D         = 1000;
  localparam longint STATES    = 8;
  localparam int     W         = 12;
  localparam longint WRAP      = STATES << W;
  localparam longint SETTLE_PS = 1900;
  localparam longint REG_PS    = 300;

  logic         reset, enable, sample;
  logic [3:0]   f, f_q;
  logic [W-1:0] cnt_raw, cnt_out, reg_raw, reg_out, cnt_q, reg_q, coarse;
  logic [2:0]   fine;

  tdc_ring_osc u_ring (.enable(enable), .reset(reset), .f(f));
  tdc_coarse_counter u_counter (.clk(f[1]), .rst(reset), .count(cnt_raw));
  tdc_coarse_register u_register (.clk(f[1]), .rst(reset), .d(cnt_out), .q(reg_raw));
  tdc_sample_mem u_mem (
    .sample        (sample),
    .rst           (reset),
    .f             (f),
    .counter_state (cnt_out),
    .register_state(reg_out),
    .f_q           (f_q),
    .counter_q     (cnt_q),
    .register_q    (reg_q)
  );
  tdc_coarse_mux u_mux (.sel(f_q[3]), .counter_q(cnt_q), .register_q(reg_q), .coarse(coarse));
  tdc_fine_encoder u_enc (.f(f_q), .fine(fine));

  // Settling models: a random mix of old and new bits, then the new value.
  logic [W-1:0] cnt_prev = '0, reg_prev = '0;
  always @(cnt_raw) begin
    cnt_out <= cnt_prev ^ ((cnt_prev ^ cnt_raw) & W'($urandom));
    cnt_out <= #(SETTLE_PS) cnt_raw;
    cnt_prev = cnt_raw;
  end
  always @(reg_raw) begin
    reg_out <= reg_prev ^ ((reg_prev ^ reg_raw) & W'($urandom));
    reg_out <= #(REG_PS) reg_raw;
    reg_prev = reg_raw;
  end

  int checks = 0, failures = 0;
  int direct_wrong = 0, near_counter_edge = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, msg);
    end
  endtask

  longint t0, k, phase, ts, exp_n, exp_prev, got, direct, err;

  initial begin
    reset  = 1'b0;
    enable = 1'b0;
    sample = 1'b0;
    #1;
    reset = 1'b1;
    #10000;
    reset = 1'b0;
    #5000;
    t0 = longint'($time);
    enable = 1'b1;
    k = 0;
    while (k < 20000) begin
      k += 3 + longint'($urandom_range(20));
      if ($urandom_range(1) == 0) begin
        // Within one stage delay of a counter edge (ring entering state 6).
        while (k % STATES != 6) k++;
        phase = longint'($urandom_range(2 * int'(D))) - D;
        near_counter_edge++;
      end else begin
        phase = longint'($urandom_range(int'(D) - 1));
      end
      ts = t0 + k * D + phase;
      #(ts - longint'($time));
      sample = 1'b1;
      #1;
      // State count at the sample edge.
      exp_n    = ((ts - t0) / D) % WRAP;
      exp_prev = (exp_n - 1 + WRAP) % WRAP;
      got      = longint'(coarse) * STATES + longint'(fine);
      check(got == exp_n || ((ts - t0) % D == 0 && got == exp_prev),
            $sformatf("multiplexed reading %0d, expected %0d", got, exp_n));
      direct = longint'(cnt_q) * STATES + longint'(fine);
      if (direct != exp_n && !((ts - t0) % D == 0 && direct == exp_prev)) begin
        direct_wrong++;
        err = (direct - exp_n + WRAP) % WRAP;
        if (err > WRAP / 2) err -= WRAP;
        if (direct_wrong <= 3)
          $display("direct reading off by %0d states at state %0d", err, exp_n);
      end
      #(D / 2);
      sample = 1'b0;
    end
    check(near_counter_edge > 0, "no sample near a counter edge");
    check(direct_wrong > 0, "reading the counter directly never went wrong");
    $display("samples near counter edge=%0d, direct readings wrong=%0d", near_counter_edge,
             direct_wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
