// tb_k_correction: checks the shift-and-add scaling for the 16-bit,
// 10-iteration macro and for a 30-bit, 30-iteration one. The exact reference
// is round(v * Kq / 2^KF) with Kq = K rounded to KF bits, computed with one
// multiplication; the result must also be within one LSB of v * K.
module tb_k_correction;
  import cordic_ref_pkg::*;
  int checks = 0, failures = 0;

  logic signed [15:0] x16, y16, xo16, yo16;
  logic signed [29:0] x30, y30, xo30, yo30;

  k_correction #(.W(16), .N(10)) u16 (.x_in(x16), .y_in(y16), .x_out(xo16), .y_out(yo16));
  k_correction #(.W(30), .N(30)) u30 (.x_in(x30), .y_in(y30), .x_out(xo30), .y_out(yo30));

  function automatic longint exact(input longint v, input int n, input int kf);
    longint kq;
    kq = longint'($floor(ref_gain(n) * (2.0 ** kf) + 0.5));
    return (v * kq + (longint'(1) << (kf - 1))) >>> kf;
  endfunction

  task automatic chk(input longint got, input longint v, input int n, input int kf, input string what);
    real ideal;
    ideal = real'(v) * ref_gain(n);
    checks++;
    if (got != exact(v, n, kf) || fabs(real'(got) - ideal) > 1.0) begin
      failures++;
      $display("FAIL %s v=%0d got %0d exact %0d ideal %f", what, v, got, exact(v, n, kf), ideal);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      x16 = 16'($urandom); y16 = 16'($urandom);
      x30 = 30'($urandom); y30 = 30'($urandom);
      if (t == 0) begin x16 = 16'sh7fff; y16 = 16'sh8000; x30 = 30'sh1fffffff; y30 = 30'sh20000000; end
      #1;
      chk(xo16, x16, 10, 18, "w16 x"); chk(yo16, y16, 10, 18, "w16 y");
      chk(xo30, x30, 30, 32, "w30 x"); chk(yo30, y30, 30, 32, "w30 y");
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
