// tb_step_angle_rom: reads every entry of the step-angle ROM of the 16-bit,
// 10-iteration macro (one stage) and of both stages of a 2-way unrolled one,
// and compares with atan(2^-i) * 2^13 and two hand-computed entries
// (atan(1) = 0.785398 rad -> 6434, atan(0.5) = 0.463648 rad -> 3798).
module tb_step_angle_rom;
  import cordic_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] r1;
  logic [2:0] r2;
  logic signed [15:0] e1, e2a, e2b;

  step_angle_rom #(.ZW(16), .N(10), .K(1), .STAGE(0)) u1  (.round(r1), .e(e1));
  step_angle_rom #(.ZW(16), .N(10), .K(2), .STAGE(0)) u2a (.round(r2), .e(e2a));
  step_angle_rom #(.ZW(16), .N(10), .K(2), .STAGE(1)) u2b (.round(r2), .e(e2b));

  task automatic chk(input longint got, input longint exp, input string what, input int i);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s i=%0d got %0d exp %0d", what, i, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 10; i++) begin
      r1 = 4'(i);
      r2 = 3'(i / 2);
      #1;
      chk(e1, ref_angle(i, 13), "K=1", i);
      chk((i % 2) ? e2b : e2a, ref_angle(i, 13), "K=2", i);
      if (i == 0) chk(e1, 6434, "atan(1)", i);
      if (i == 1) chk(e1, 3798, "atan(1/2)", i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
