// tb_fp_prenorm: random operands with exponent differences of both signs,
// small and beyond the word length, and z exponents from -40 to +2. Checks
// the aligned mantissas and the common exponent bit exactly, and that the
// values represented before and after alignment agree to within one LSB.
module tb_fp_prenorm;
  import cordic_ref_pkg::*;
  localparam int NM = 28, EW = 8;
  int checks = 0, failures = 0;

  logic signed [NM-1:0] xm, ym, zm;
  logic signed [EW-1:0] xe, ye, ze, eo;
  logic signed [NM+1:0] xi, yi, zi;

  fp_prenorm #(.NM(NM), .EW(EW)) u_dut (
    .x_man(xm), .x_exp(xe), .y_man(ym), .y_exp(ye), .z_man(zm), .z_exp(ze),
    .x_i(xi), .y_i(yi), .z_i(zi), .exp_o(eo));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s xm=%0d xe=%0d ym=%0d ye=%0d zm=%0d ze=%0d", what, xm, xe, ym, ye, zm, ze);
    end
  endtask

  function automatic longint sra(input longint v, input int s);
    return (s >= 63) ? ((v < 0) ? -1 : 0) : (v >>> s);
  endfunction

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    for (int i = 0; i < e; i++) r = r * 2.0;
    for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      longint ex_x, ex_y, ex_z;
      int     d, emax;
      real    sc, vx_in, vy_in, vx_out, vy_out;
      bit     ok_x, ok_y;
      xm = NM'($urandom); ym = NM'($urandom); zm = NM'($urandom);
      xe = EW'($urandom_range(0, 60)) - 8'sd30;
      ye = (t % 3 == 0) ? xe : EW'($urandom_range(0, 60)) - 8'sd30;
      ze = EW'($urandom_range(0, 42)) - 8'sd40;
      #1;
      d    = int'(xe) - int'(ye);
      emax = (d >= 0) ? int'(xe) : int'(ye);
      ex_x = xm;
      ex_y = ym;
      ex_z = zm;
      if (d >= 0) ex_y = sra(ex_y, d);
      else        ex_x = sra(ex_x, -d);
      if (ze >= 0) ex_z = ex_z <<< int'(ze);
      else         ex_z = sra(ex_z, -int'(ze));
      chk(eo == emax, "exponent");
      chk(xi == ex_x && yi == ex_y, "aligned mantissas");
      chk(zi == ex_z, "z fixed point");
      // represented values
      sc = pow2(emax - (NM - 1));
      vx_in  = real'(longint'(xm)) * pow2(int'(xe) - (NM - 1));
      vy_in  = real'(longint'(ym)) * pow2(int'(ye) - (NM - 1));
      vx_out = real'(longint'(xi)) * sc;
      vy_out = real'(longint'(yi)) * sc;
      ok_x   = fabs(vx_out - vx_in) <= sc;
      ok_y   = fabs(vy_out - vy_in) <= sc;
      chk(ok_x && ok_y, "values kept");
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
