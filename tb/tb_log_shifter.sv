// tb_log_shifter: exhaustive shift amounts with random data for a plain
// logarithmic shifter (step 1) and a step-2 shifter as used in a 2-way
// unrolled CORDIC; compares with the arithmetic right shift.
module tb_log_shifter;
  int checks = 0, failures = 0;
  logic signed [15:0] d, o1, o2;
  logic [3:0] amt1;
  logic [2:0] amt2;

  log_shifter #(.WIDTH(16), .AMT_W(4), .STEP(1)) u1 (.din(d), .amt(amt1), .dout(o1));
  log_shifter #(.WIDTH(16), .AMT_W(3), .STEP(2)) u2 (.din(d), .amt(amt2), .dout(o2));

  initial begin
    for (int t = 0; t < 200; t++) begin
      d = 16'($urandom);
      if (t == 0) d = 16'sh8000;
      for (int s = 0; s < 16; s++) begin
        amt1 = 4'(s);
        amt2 = 3'(s);
        #1;
        checks++;
        if (o1 != (d >>> s)) begin
          failures++;
          $display("FAIL step1 d=%h s=%0d got %h", d, s, o1);
        end
        if (s < 8) begin
          checks++;
          if (o2 != (d >>> (2 * s))) begin
            failures++;
            $display("FAIL step2 d=%h s=%0d got %h", d, s, o2);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
