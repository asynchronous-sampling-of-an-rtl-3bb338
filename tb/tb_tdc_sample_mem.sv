// tb_tdc_sample_mem: checks the sample memory.
//
// Random ring, counter and register values are presented and changed
// between sample edges; each rising edge of sample must store all three as
// they were at the edge, the stored values must hold through later input
// changes and through the falling edge of sample, and reset must load the
// rest pattern 0101 (F0..F3) and zero counts.
module tb_tdc_sample_mem;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int W = 12;

  logic         sample, rst;
  logic [3:0]   f, f_q;
  logic [W-1:0] cs, rs, cq, rq;

  tdc_sample_mem dut (
    .sample        (sample),
    .rst           (rst),
    .f             (f),
    .counter_state (cs),
    .register_state(rs),
    .f_q           (f_q),
    .counter_q     (cq),
    .register_q    (rq)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, msg);
    end
  endtask

  logic [3:0]   ef;
  logic [W-1:0] ec, er;

  initial begin
    sample = 1'b0;
    rst    = 1'b0;
    f = '0; cs = '0; rs = '0;
    #1;
    rst = 1'b1;
    #5;
    check(f_q == 4'b1010 && cq == '0 && rq == '0, "reset values");
    rst = 1'b0;
    #5;
    for (int n = 0; n < 500; n++) begin
      f  = 4'($urandom);
      cs = W'($urandom);
      rs = W'($urandom);
      ef = f; ec = cs; er = rs;
      #3;
      sample = 1'b1;
      #1;
      check(f_q == ef && cq == ec && rq == er, $sformatf("sample %0d not stored", n));
      f  = ~f;
      cs = W'($urandom);
      rs = W'($urandom);
      #3;
      sample = 1'b0;
      #3;
      f  = 4'($urandom);
      #1;
      check(f_q == ef && cq == ec && rq == er, $sformatf("sample %0d not held", n));
    end
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
