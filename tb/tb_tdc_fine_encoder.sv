// tb_tdc_fine_encoder: checks the fine-state encoder.
//
// The ring's code is generated independently of the encoder: start from
// the rest pattern (alternating 0,1,0,1,... from F0) and, for step k, invert
// stage k mod STAGES, which is how the single edge travels round the ring.
// After k steps the encoder must output k mod 2*STAGES. This is done for
// the default 4-stage ring and for a 6-stage ring.
module tb_tdc_fine_encoder;
  timeunit 1ps;
  timeprecision 1ps;

  logic [3:0] f4;
  logic [2:0] fine4;
  logic [5:0] f6;
  logic [3:0] fine6;

  tdc_fine_encoder dut (
    .f   (f4),
    .fine(fine4)
  );

  tdc_fine_encoder #(.STAGES(6)) dut6 (
    .f   (f6),
    .fine(fine6)
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
    f4 = 4'b1010;
    f6 = 6'b101010;
    for (int k = 0; k < 40; k++) begin
      #1;
      check(int'(fine4) == k % 8, $sformatf("4 stages, step %0d: f=%b fine=%0d", k, f4, fine4));
      check(int'(fine6) == k % 12, $sformatf("6 stages, step %0d: f=%b fine=%0d", k, f6, fine6));
      f4[k % 4] = ~f4[k % 4];
      f6[k % 6] = ~f6[k % 6];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
