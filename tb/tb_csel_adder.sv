// tb_csel_adder: random and corner-case test of the carry-select adder at the
// exact progression widths 16 (1,3,5,7) and 12 (2,4,6), the 30-bit width of
// the co-processor (2,4,6,8,10) and a pruned width of 18.
module tb_csel_adder;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;  logic c16, co16;
  logic [11:0] a12, b12, s12;  logic c12, co12;
  logic [29:0] a30, b30, s30;  logic c30, co30;
  logic [17:0] a18, b18, s18;  logic c18, co18;

  csel_adder #(.WIDTH(16)) u16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));
  csel_adder #(.WIDTH(12)) u12 (.a(a12), .b(b12), .cin(c12), .sum(s12), .cout(co12));
  csel_adder #(.WIDTH(30)) u30 (.a(a30), .b(b30), .cin(c30), .sum(s30), .cout(co30));
  csel_adder #(.WIDTH(18), .FIRST(1)) u18 (.a(a18), .b(b18), .cin(c18), .sum(s18), .cout(co18));

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      longint r1, r2;
      r1 = {$urandom, $urandom};
      r2 = {$urandom, $urandom};
      if (t < 8) begin  // carry-propagation corners
        r1 = (t[0]) ? -1 : 0;
        r2 = (t[1]) ? 1 : -1;
      end
      a16 = 16'(r1); b16 = 16'(r2); c16 = 1'($urandom);
      a12 = 12'(r1); b12 = 12'(r2); c12 = 1'($urandom);
      a30 = 30'(r1); b30 = 30'(r2); c30 = 1'($urandom);
      a18 = 18'(r1); b18 = 18'(r2); c18 = t[2];
      #1;
      chk({co16, s16}, longint'(a16) + longint'(b16) + longint'(c16), "w16");
      chk({co12, s12}, longint'(a12) + longint'(b12) + longint'(c12), "w12");
      chk({co30, s30}, longint'(a30) + longint'(b30) + longint'(c30), "w30");
      chk({co18, s18}, longint'(a18) + longint'(b18) + longint'(c18), "w18");
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
