// tb_cordic_gnss_top: end-to-end test of both CORDIC macros at their default
// sizes, running at the same time.
//
// Baseband macro (16 bits, 10 iterations, K-corrected outputs): carrier
// rotations (rotate mode) and phase/magnitude extraction (vectoring mode),
// issued back to back in the cycle the previous result appears. Results are
// checked bit exactly against an integer model and against cos/sin/atan2.
// Co-processor (28-bit mantissas, 30 iterations): floating-point rotations
// and vectoring operations with x or y holding the larger exponent and z
// exponents of both signs, each checked against real arithmetic.
//
// Mechanisms counted, each must occur at least once: rotate and vectoring on
// both macros, the iteration feedback of the baseband ring (ready low),
// back-to-back baseband operations, the shift-and-add correction changing a
// value, exponent alignment of x and of y, z converted with a left and a
// right shift, a co-processor start ignored while busy (processor stall), and
// co-processor results with and without the hardware gain correction.
module tb_cordic_gnss_top;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  localparam int BW = 16, BN = 10, NM = 28, EW = 8, CN = 30;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 bb_init, bb_ready, bb_done;
  cordic_mode_e         bb_mode, cp_mode;
  logic signed [BW-1:0] bb_x0, bb_y0, bb_z0, bb_x, bb_y, bb_z;
  logic                 cp_start, cp_busy, cp_done, cp_kcorr;
  logic signed [NM-1:0] cp_xm, cp_ym, cp_zm;
  logic signed [EW-1:0] cp_xe, cp_ye, cp_ze, cp_er;
  logic signed [NM:0]   cp_xr, cp_yr, cp_zr;

  cordic_gnss_top u_top (
    .clk, .rst_n,
    .bb_init, .bb_mode, .bb_x0, .bb_y0, .bb_z0, .bb_ready, .bb_done,
    .bb_x_out(bb_x), .bb_y_out(bb_y), .bb_z_out(bb_z),
    .cp_start, .cp_mode, .cp_kcorr, .cp_x_man(cp_xm), .cp_x_exp(cp_xe), .cp_y_man(cp_ym), .cp_y_exp(cp_ye),
    .cp_z_man(cp_zm), .cp_z_exp(cp_ze), .cp_busy, .cp_done,
    .cp_x_res(cp_xr), .cp_y_res(cp_yr), .cp_z_res(cp_zr), .cp_exp_res(cp_er));

  int checks = 0, failures = 0;
  // mechanism counters
  int n_bb_rot = 0, n_bb_vec = 0, n_bb_feedback = 0, n_bb_b2b = 0, n_kcorr = 0;
  int n_cp_rot = 0, n_cp_vec = 0, n_align_x = 0, n_align_y = 0, n_z_left = 0, n_z_right = 0;
  int n_stall = 0, n_cp_hwk = 0, n_cp_swk = 0;

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

  function automatic longint kscale(input longint v);
    longint kq;
    kq = longint'($floor(ref_gain(BN) * pow2(BW + 2) + 0.5));
    return (v * kq + (longint'(1) << (BW + 1))) >>> (BW + 2);
  endfunction

  always @(posedge clk) if (rst_n && !bb_ready) n_bb_feedback++;

  // ---------------- baseband macro ----------------
  task automatic bb_run(input int nops);
    longint qx[$], qy[$], qz[$], ax[$], ay[$], az[$];
    bit     qv[$];
    int     issued = 0, got = 0, last_done_cyc = -100, cyc = 0;
    while (got < nops) begin
      @(negedge clk);
      cyc++;
      // check a result that is present in this cycle
      if (bb_done) begin
        longint ex, ey, ez, x0, y0, z0, rx, ry;
        bit     v;
        real    tx, ty, tz;
        ex = qx.pop_front(); ey = qy.pop_front(); ez = qz.pop_front();
        x0 = ax.pop_front(); y0 = ay.pop_front(); z0 = az.pop_front(); v = qv.pop_front();
        rx = kscale(ex); ry = kscale(ey);
        if (rx != ex || ry != ey) n_kcorr++;
        chk(bb_x == rx && bb_y == ry && bb_z == ez,
            $sformatf("bb bit-exact: got %0d %0d %0d exp %0d %0d %0d", bb_x, bb_y, bb_z, rx, ry, ez));
        if (!v) begin
          tx = x0 * $cos(z0 / 8192.0) - y0 * $sin(z0 / 8192.0);
          ty = x0 * $sin(z0 / 8192.0) + y0 * $cos(z0 / 8192.0);
          chk(fabs(bb_x - tx) < 40.0 && fabs(bb_y - ty) < 40.0,
              $sformatf("bb rotate: %0d %0d vs %f %f", bb_x, bb_y, tx, ty));
          n_bb_rot++;
        end else begin
          tx = $sqrt(real'(x0 * x0 + y0 * y0));
          tz = $atan2(real'(y0), real'(x0));
          chk(fabs(bb_x - tx) < 40.0 && fabs(bb_z / 8192.0 - tz) < 0.005,
              $sformatf("bb vectoring: %0d %f vs %f %f", bb_x, bb_z / 8192.0, tx, tz));
          n_bb_vec++;
        end
        last_done_cyc = cyc;
        got++;
      end
      bb_init = 1'b0;
      if (bb_ready && issued < nops) begin
        longint xr, yr, zr;
        bit     v;
        real    ang, mag;
        v    = issued[0];
        mag  = 3000.0 + 15000.0 * ($urandom_range(0, 1000) / 1000.0);
        ang  = ($urandom_range(0, 2000) / 1000.0 - 1.0) * 1.5;
        bb_x0 = BW'(longint'($floor(mag * $cos(ang))));
        bb_y0 = BW'(longint'($floor(mag * $sin(ang))));
        bb_z0 = v ? 16'sd0 : BW'(longint'($floor(-ang * 8192.0 * 0.9)));
        bb_mode = v ? MODE_VECTOR : MODE_ROTATE;
        bb_init = 1'b1;
        if (last_done_cyc == cyc) n_bb_b2b++;
        xr = bb_x0; yr = bb_y0; zr = bb_z0;
        ax.push_back(xr); ay.push_back(yr); az.push_back(zr); qv.push_back(v);
        ref_cordic(BN, v, BW, BW, BW - 3, xr, yr, zr);
        qx.push_back(xr); qy.push_back(yr); qz.push_back(zr);
        issued++;
      end
    end
    @(negedge clk);
    bb_init = 1'b0;
  endtask

  // ---------------- co-processor ----------------
  task automatic cp_run(input int nops);
    for (int t = 0; t < nops; t++) begin
      int  ex, ey, ez, wait_cyc;
      real ax, ay, az, ang, vx, vy, vz, tx, ty, tz, tol, kg;
      bit  v;
      v   = t[0];
      ex  = $urandom_range(0, 16) - 8;
      ey  = ex + ((t % 3 == 0) ? 2 : (t % 3 == 1) ? -2 : 0);
      ang = ($urandom_range(0, 2000) / 1000.0 - 1.0) * 1.4;
      ax  = pow2(ex) * 0.6 * $cos(ang);
      ay  = pow2(ey) * 0.6 * $sin(ang);
      if (t[1]) begin az = ang;        ez = 1;  end
      else      begin az = ang / 8.0;  ez = -2; end
      if (ex < ey) n_align_x++;
      if (ex > ey) n_align_y++;
      if (ez > 0) n_z_left++;
      if (ez < 0) n_z_right++;
      @(negedge clk);
      cp_xm = NM'(longint'($floor(ax / pow2(ex) * pow2(NM - 1))));
      cp_ym = NM'(longint'($floor(ay / pow2(ey) * pow2(NM - 1))));
      cp_zm = NM'(longint'($floor(az / pow2(ez) * pow2(NM - 1))));
      cp_xe = EW'(ex); cp_ye = EW'(ey); cp_ze = EW'(ez);
      cp_mode  = v ? MODE_VECTOR : MODE_ROTATE;
      cp_kcorr = t[2];
      cp_start = 1'b1;
      @(negedge clk);
      // keep start high for one more cycle: the processor retries while the
      // co-processor is busy, which must not start a second operation
      if (cp_busy) n_stall++;
      @(negedge clk);
      cp_start = 1'b0;
      wait_cyc = 1;   // rising edges since the one that accepted start
      while (!cp_done && wait_cyc < 100) begin
        @(negedge clk);
        wait_cyc++;
      end
      chk(wait_cyc == CN, $sformatf("cp latency %0d, expected %0d", wait_cyc, CN));
      // without hardware post-processing the processor multiplies by K
      kg = cp_kcorr ? 1.0 : ref_gain(CN);
      if (cp_kcorr) n_cp_hwk++; else n_cp_swk++;
      vx = real'(longint'(cp_xr)) * pow2(int'(cp_er) - (NM - 2)) * kg;
      vy = real'(longint'(cp_yr)) * pow2(int'(cp_er) - (NM - 2)) * kg;
      vz = real'(longint'(cp_zr)) * pow2(-(NM - 2));
      tol = 1e-6 * pow2((ex > ey) ? ex : ey);
      if (!v) begin
        tx = ax * $cos(az) - ay * $sin(az);
        ty = ax * $sin(az) + ay * $cos(az);
        chk(fabs(vx - tx) < tol && fabs(vy - ty) < tol && fabs(vz) < 1e-6,
            $sformatf("cp rotate: %g %g %g vs %g %g 0", vx, vy, vz, tx, ty));
        n_cp_rot++;
      end else begin
        tx = $sqrt(ax * ax + ay * ay);
        tz = az + $atan2(ay, ax);
        chk(fabs(vx - tx) < tol && fabs(vy) < tol && fabs(vz - tz) < 1e-6,
            $sformatf("cp vectoring: %g %g %g vs %g 0 %g", vx, vy, vz, tx, tz));
        n_cp_vec++;
      end
    end
  endtask

  task automatic need(input int n, input string what);
    $display("  %-36s %0d", what, n);
    chk(n > 0, $sformatf("mechanism never exercised: %s", what));
  endtask

  initial begin
    bb_init = 1'b0; bb_mode = MODE_ROTATE; bb_x0 = '0; bb_y0 = '0; bb_z0 = '0;
    cp_start = 1'b0; cp_mode = MODE_ROTATE; cp_kcorr = 1'b0;
    cp_xm = '0; cp_ym = '0; cp_zm = '0; cp_xe = '0; cp_ye = '0; cp_ze = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    fork
      bb_run(200);
      cp_run(24);
    join
    $display("mechanisms:");
    need(n_bb_rot, "baseband rotate mode");
    need(n_bb_vec, "baseband vectoring mode");
    need(n_bb_feedback, "baseband iteration feedback cycles");
    need(n_bb_b2b, "baseband back-to-back operations");
    need(n_kcorr, "scale correction applied");
    need(n_cp_rot, "co-processor rotate mode");
    need(n_cp_vec, "co-processor vectoring mode");
    need(n_align_x, "alignment shifts x");
    need(n_align_y, "alignment shifts y");
    need(n_z_left, "z converted by left shift");
    need(n_z_right, "z converted by right shift");
    need(n_stall, "start while busy ignored");
    need(n_cp_hwk, "co-processor gain correction in hw");
    need(n_cp_swk, "co-processor raw results (K by cpu)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
