// tb_cordic_coproc: floating-point operations through the co-processor at its
// full size (28-bit mantissas, 8-bit exponents, 30 iterations). Rotations and
// vectoring operations with random exponents; x and y get different
// exponents so that the alignment shifts either of them. Each result is
// checked bit exactly against an integer model (alignment, 30 iterations,
// LSB dropped) and, after multiplication by K, against cos/sin/hypot/atan2
// with a relative error below 1e-6. Half of the operations have the gain
// correction done in hardware (kcorr = 1), checked against round(v * K). Also checks the handshake: done comes
// N cycles after the clock edge that accepted start, busy is high in between, and a start while busy
// is ignored.
module tb_cordic_coproc;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;
  localparam int NM = 28, EW = 8, N = 30, IW = NM + 2, FRAC = NM - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 start, busy, done, kcorr;
  cordic_mode_e         mode;
  logic signed [NM-1:0] xm, ym, zm;
  logic signed [EW-1:0] xe, ye, ze, er;
  logic signed [NM:0]   xr, yr, zr;

  cordic_coproc #(.NM(NM), .EW(EW), .N(N)) u_dut (
    .clk, .rst_n, .start, .mode, .kcorr, .x_man(xm), .x_exp(xe), .y_man(ym), .y_exp(ye),
    .z_man(zm), .z_exp(ze), .busy, .done, .x_res(xr), .y_res(yr), .z_res(zr), .exp_res(er));

  int checks = 0, failures = 0, ignored_starts = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    for (int i = 0; i < e; i++) r = r * 2.0;
    for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  // float -> (mantissa with |m| in [0.5, 1), exponent)
  task automatic to_float(input real v, input int e, output logic signed [NM-1:0] m);
    m = NM'(longint'($floor(v / pow2(e) * pow2(NM - 1))));
  endtask

  // round(v * K_30) with K_30 rounded to 32 fractional bits
  function automatic longint kscale(input longint v);
    longint kq;
    kq = longint'($floor(ref_gain(N) * pow2(IW + 2) + 0.5));
    return (v * kq + (longint'(1) << (IW + 1))) >>> (IW + 2);
  endfunction

  task automatic run_op(input bit vect, input bit hwk, input real ax, input real ay, input real az,
                        input int ex, input int ey, input int ez);
    longint rx, ry, rz, sx, sy;
    int     d, emax, t0;
    real    kg, vx, vy, vz, tx, ty, tz, scl;
    @(negedge clk);
    to_float(ax, ex, xm); to_float(ay, ey, ym); to_float(az, ez, zm);
    xe = EW'(ex); ye = EW'(ey); ze = EW'(ez);
    mode  = vect ? MODE_VECTOR : MODE_ROTATE;
    kcorr = hwk;
    start = 1'b1;
    // independent model of the pre-processing
    d = ex - ey;
    emax = (d >= 0) ? ex : ey;
    sx = xm; sy = ym; rz = zm;
    if (d >= 0) sy = (d >= IW) ? ((sy < 0) ? -1 : 0) : (sy >>> d);
    else        sx = (-d >= IW) ? ((sx < 0) ? -1 : 0) : (sx >>> -d);
    if (ez >= 0) rz = rz <<< ez; else rz = rz >>> -ez;
    rx = sx; ry = sy;
    ref_cordic(N, vect, IW, IW, FRAC, rx, ry, rz);
    if (hwk) begin
      rx = kscale(rx);
      ry = kscale(ry);
    end
    @(posedge clk);
    t0 = 0;
    @(negedge clk);
    start = 1'b0;
    chk(busy, "busy after start");
    // a second start while busy must be ignored
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    ignored_starts++;
    while (!done) begin
      @(negedge clk);
      t0++;
      if (t0 > 100) break;
    end
    chk(t0 + 1 == N, $sformatf("latency: done %0d cycles after start, expected %0d", t0 + 1, N));
    chk(!busy, "busy low at done");
    chk(xr == (rx >>> 1) && yr == (ry >>> 1) && zr == (rz >>> 1) && er == EW'(emax),
        $sformatf("bit-exact: got %0d %0d %0d e%0d exp %0d %0d %0d e%0d", xr, yr, zr, er,
                  rx >>> 1, ry >>> 1, rz >>> 1, emax));
    kg  = hwk ? 1.0 : ref_gain(N);
    scl = pow2(int'(er) - (NM - 2));
    vx  = real'(longint'(xr)) * scl * kg;
    vy  = real'(longint'(yr)) * scl * kg;
    vz  = real'(longint'(zr)) * pow2(-(NM - 2));
    if (!vect) begin
      tx = ax * $cos(az) - ay * $sin(az);
      ty = ax * $sin(az) + ay * $cos(az);
      chk(fabs(vx - tx) < 1e-6 * pow2(emax) && fabs(vy - ty) < 1e-6 * pow2(emax),
          $sformatf("rotate: %g %g vs %g %g", vx, vy, tx, ty));
    end else begin
      tx = $sqrt(ax * ax + ay * ay);
      tz = az + $atan2(ay, ax);   // vectoring adds the angle to z0
      chk(fabs(vx - tx) < 1e-6 * pow2(emax) && fabs(vz - tz) < 1e-6,
          $sformatf("vectoring: %g %g vs %g %g", vx, vz, tx, tz));
    end
  endtask

  initial begin
    start = 1'b0; mode = MODE_ROTATE; kcorr = 1'b0;
    xm = '0; ym = '0; zm = '0; xe = '0; ye = '0; ze = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      int  ex, ey, ez;
      real ax, ay, az, ang, mag;
      ex  = $urandom_range(0, 20) - 10;
      ey  = ex + $urandom_range(0, 6) - 3;
      mag = pow2(ex) * (0.3 + 0.4 * ($urandom_range(0, 1000) / 1000.0));
      ang = ($urandom_range(0, 2000) / 1000.0 - 1.0) * 1.5;
      ax  = mag * $cos(ang);
      ay  = pow2(ey) * 0.4 * $sin(ang);
      az  = ang;
      ez  = 1;
      if (t % 4 == 2) begin az = ang / 16.0; ez = -3; end
      run_op(t[0], t[1], ax, ay, az, ex, ey, ez);
    end
    $display("ignored starts while busy: %0d", ignored_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
