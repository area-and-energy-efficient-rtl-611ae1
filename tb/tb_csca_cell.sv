// tb_csca_cell: exhaustive test of the carry-select bit cell, both variants.
// Checks the two conditional carries and the selected sum against a + b + c.
module tb_csca_cell;
  logic a, b, ci0, ci1, cs;
  logic co0_g, co1_g, s_g, co0_f, co1_f, s_f;
  int checks = 0, failures = 0;

  csca_cell #(.FIRST(1'b0)) u_gen (.a, .b, .ci0, .ci1, .cs, .co0(co0_g), .co1(co1_g), .s(s_g));
  csca_cell #(.FIRST(1'b1)) u_fst (.a, .b, .ci0, .ci1, .cs, .co0(co0_f), .co1(co1_f), .s(s_f));

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b ci0=%0b ci1=%0b cs=%0b got %0b exp %0b",
               what, a, b, ci0, ci1, cs, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [1:0] s0, s1;
      {a, b, ci0, ci1, cs} = 5'(v);
      #1;
      s0 = a + b + ci0;
      s1 = a + b + ci1;
      chk(co0_g, s0[1], "csca1 co0");
      chk(co1_g, s1[1], "csca1 co1");
      chk(s_g, cs ? s1[0] : s0[0], "csca1 s");
      s0 = a + b;
      s1 = a + b + 1'b1;
      chk(co0_f, s0[1], "csca0 co0");
      chk(co1_f, s1[1], "csca0 co1");
      chk(s_f, cs ? s1[0] : s0[0], "csca0 s");
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
