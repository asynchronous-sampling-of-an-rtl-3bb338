// tb_tdc_coarse_counter: checks the ripple counter at its default 12-bit
// width.
//
// Clock pulses are applied one at a time; after each rising edge (and a
// settling wait) the count must equal the number of rising edges since
// reset, modulo 4096, and a falling edge must leave it alone. The test runs
// past the wrap from 4095 to 0 and checks that an asynchronous reset in
// the middle of a count clears every bit.
module tb_tdc_coarse_counter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int W = 12;

  logic         clk, rst;
  logic [W-1:0] count;

  tdc_coarse_counter dut (
    .clk  (clk),
    .rst  (rst),
    .count(count)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, msg);
    end
  endtask

  int unsigned edges;
  logic [W-1:0] held;
  bit wrapped = 1'b0;

  initial begin
    clk = 1'b0;
    rst = 1'b0;
    #1;
    rst = 1'b1;
    #10;
    check(count == '0, "not cleared by reset");
    rst = 1'b0;
    #10;
    edges = 0;
    for (int n = 0; n < 5000; n++) begin
      clk = 1'b1;
      #5;
      edges++;
      check(count == W'(edges), $sformatf("after %0d edges count=%0d", edges, count));
      if (count == '0) wrapped = 1'b1;
      held = count;
      clk = 1'b0;
      #5;
      check(count == held, "count changed on a falling clock edge");
    end
    check(wrapped, "counter never wrapped");

    rst = 1'b1;
    #5;
    check(count == '0, "asynchronous reset did not clear the count");
    rst = 1'b0;
    #5;
    for (int n = 1; n <= 37; n++) begin
      clk = 1'b1;
      #5;
      clk = 1'b0;
      #5;
    end
    check(count == W'(37), "count after reset and 37 edges");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
