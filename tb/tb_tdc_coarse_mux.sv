// tb_tdc_coarse_mux: checks the coarse multiplexer in both select
// polarities: with the default polarity the counter copy is taken when
// sel is 1, with SEL_COUNTER = 0 when sel is 0. Random inputs.
module tb_tdc_coarse_mux;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int W = 12;

  logic         sel;
  logic [W-1:0] cq, rq, coarse_hi, coarse_lo;

  tdc_coarse_mux dut (
    .sel       (sel),
    .counter_q (cq),
    .register_q(rq),
    .coarse    (coarse_hi)
  );

  tdc_coarse_mux #(.SEL_COUNTER(1'b0)) dut_lo (
    .sel       (sel),
    .counter_q (cq),
    .register_q(rq),
    .coarse    (coarse_lo)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, msg);
    end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      sel = 1'($urandom);
      cq  = W'($urandom);
      rq  = W'($urandom);
      #1;
      check(coarse_hi == (sel ? cq : rq), "default polarity");
      check(coarse_lo == (sel ? rq : cq), "inverted polarity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
