// tb_tdc_coarse_register: checks that the coarse copy register loads on
// the falling clock edge only.
//
// Random data is presented; a rising clock edge must leave q unchanged, a
// falling edge must load the data present at that edge, data changes
// between edges must not reach q, and reset must clear q at once.
module tb_tdc_coarse_register;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int W = 12;

  logic         clk, rst;
  logic [W-1:0] d, q;

  tdc_coarse_register dut (
    .clk(clk),
    .rst(rst),
    .d  (d),
    .q  (q)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, msg);
    end
  endtask

  logic [W-1:0] held;

  initial begin
    clk = 1'b1;
    rst = 1'b0;
    d   = '0;
    #1;
    rst = 1'b1;
    #5;
    check(q == '0, "not cleared by reset");
    rst = 1'b0;
    held = '0;
    for (int n = 0; n < 500; n++) begin
      clk = 1'b0;
      #5;
      d = W'($urandom);
      #5;
      check(q == held, "q changed without a falling edge");
      clk = 1'b1;
      #5;
      check(q == held, "q changed on a rising edge");
      d = W'($urandom);
      #5;
      clk = 1'b0;
      held = d;
      #1;
      check(q == held, $sformatf("falling edge loaded %0h, expected %0h", q, held));
      clk = 1'b1;
      #4;
    end
    rst = 1'b1;
    #1;
    check(q == '0, "asynchronous reset did not clear q");
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
