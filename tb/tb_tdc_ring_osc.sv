// tb_tdc_ring_osc: checks the gated ring oscillator model.
//
// With the default 4 stages and 1 ns stage delay the ring must rest at
// F0..F3 = 0101 while enable is low or reset is high, and after enable
// rises at t0 it must show, in the middle of each stage delay, the
// 8-state sequence 0101 1101 1001 1011 1010 0010 0110 0100 (state k from
// t0 + k*D on). The period of every tap is checked to be 8 stage delays,
// and both disabling and resetting a running ring must bring it back to
// rest within 8 stage delays and keep it there.
module tb_tdc_ring_osc;
  timeunit 1ps;
  timeprecision 1ps;

  localparam longint D = 1000;

  logic       enable, reset;
  logic [3:0] f;

  tdc_ring_osc dut (
    .enable(enable),
    .reset (reset),
    .f     (f)
  );

  // Expected outputs per fine state, f[0] = F0.
  localparam logic [3:0] SEQ [8] = '{4'b1010, 4'b1011, 4'b1001, 4'b1101,
                                     4'b0101, 4'b0100, 4'b0110, 4'b0010};

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, msg);
    end
  endtask

  // Period measurement on every tap.
  longint last_rise [4];
  int     periods_ok = 0;
  bit     measuring = 1'b0;
  for (genvar i = 0; i < 4; i++) begin : g_per
    always @(posedge f[i]) begin
      if (measuring && last_rise[i] != 0) begin
        check(longint'($time) - last_rise[i] == 8 * D,
              $sformatf("tap F%0d period %0d ps", i, longint'($time) - last_rise[i]));
        periods_ok++;
      end
      last_rise[i] = longint'($time);
    end
  end

  longint t0;
  int     changes;
  always @(f) changes++;

  initial begin
    for (int i = 0; i < 4; i++) last_rise[i] = 0;
    changes = 0;
    enable  = 1'b0;
    reset   = 1'b0;
    #1;
    reset = 1'b1;
    #(10 * D);
    check(f == SEQ[0], "not at rest during reset");
    reset = 1'b0;
    #(10 * D);
    check(f == SEQ[0], "not at rest with enable low");

    t0 = longint'($time);
    enable    = 1'b1;
    measuring = 1'b1;
    for (longint k = 0; k < 80; k++) begin
      #(t0 + k * D + D / 2 - longint'($time));
      check(f == SEQ[3'(k % 8)], $sformatf("state %0d: f=%b expected %b", k, f, SEQ[3'(k % 8)]));
    end
    check(periods_ok >= 30, "too few periods measured");

    // Disable in mid-flight: back to rest within 8 stage delays.
    measuring = 1'b0;
    #(3 * D);
    enable = 1'b0;
    #(8 * D + D / 2);
    check(f == SEQ[0], "not at rest after disable");
    changes = 0;
    #(20 * D);
    check(changes == 0 && f == SEQ[0], "ring moved while disabled");

    // Reset a running ring.
    enable = 1'b1;
    #(13 * D + D / 3);
    reset = 1'b1;
    #(8 * D + D / 2);
    check(f == SEQ[0], "not at rest after reset of a running ring");
    changes = 0;
    #(20 * D);
    check(changes == 0, "ring moved while held in reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * D);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
