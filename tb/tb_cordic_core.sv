// tb_cordic_core: runs rotate and vectoring operations through four 16-bit,
// 10-iteration CORDIC cores: fully iterative (K=1), partially unrolled (K=2,
// K=5) and fully unrolled (K=10). Each result is compared bit exactly with an integer
// reference model and, after scaling by K_n, with cos/sin/atan2/hypot from
// real arithmetic. Checks the latency (done N cycles after the init cycle)
// and the throughput: new operations are issued whenever ready is high, so
// K=1 must finish one per 10 cycles, K=2 two and K=5 five per 10, K=10 one
// per cycle.
module tb_cordic_core;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  localparam int W = 16, N = 10, FRAC = W - 3, NOPS = 60;
  localparam int KS [4] = '{1, 2, 5, 10};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  for (genvar c = 0; c < 4; c++) begin : g_dut
    localparam int K = KS[c];
    logic               init, ready, done;
    cordic_mode_e       mode;
    logic signed [W-1:0] x0, y0, z0, xm, ym, zm;

    cordic_core #(.W(W), .N(N), .K(K)) u_dut (
      .clk, .rst_n, .init, .mode, .x0, .y0, .z0, .ready, .done, .x_m(xm), .y_m(ym), .z_m(zm));

    // expected results in issue order, with the cycle of issue
    longint q_x[$], q_y[$], q_z[$], q_x0[$], q_y0[$], q_z0[$];
    int     q_t[$];
    bit     q_v[$];
    int     cyc = 0, issued = 0, finished = 0, first_done = -1, last_done = -1;

    always @(posedge clk) cyc <= cyc + 1;

    // driver: issue a new random operation whenever the ring has room
    always @(negedge clk) begin
      init = 1'b0;
      if (rst_n && ready && issued < NOPS) begin
        longint xr, yr, zr;
        bit     v;
        real    ang, mag;
        v   = issued[0];
        mag = 4000.0 + 14000.0 * ($urandom_range(0, 1000) / 1000.0);
        ang = (($urandom_range(0, 2000) / 1000.0) - 1.0) * 3.14159265 * (v ? 1.0 : 0.5);
        x0  = v ? W'(longint'($floor(mag * $cos(ang)))) : W'(longint'($floor(mag)));
        y0  = v ? W'(longint'($floor(mag * $sin(ang)))) : 16'sd0;
        z0  = v ? 16'sd0 : W'(longint'($floor(ang * 8192.0)));
        if (issued < 2) begin  // corners: zero angle and a vector on the axis
          x0 = 16'sd10000; y0 = 16'sd0; z0 = 16'sd0;
        end
        mode = v ? MODE_VECTOR : MODE_ROTATE;
        init = 1'b1;
        xr = x0; yr = y0; zr = z0;
        q_x0.push_back(xr); q_y0.push_back(yr); q_z0.push_back(zr);
        ref_cordic(N, v, W, W, FRAC, xr, yr, zr);
        q_x.push_back(xr); q_y.push_back(yr); q_z.push_back(zr);
        q_t.push_back(cyc); q_v.push_back(v);
        issued++;
      end
    end

    // monitor
    always @(posedge clk) begin
      if (rst_n && done) begin
        longint ex, ey, ez, ax, ay, az;
        int     t0;
        bit     v;
        real    kg, xr, yr, zr, tol;
        ex = q_x.pop_front(); ey = q_y.pop_front(); ez = q_z.pop_front();
        ax = q_x0.pop_front(); ay = q_y0.pop_front(); az = q_z0.pop_front();
        t0 = q_t.pop_front(); v = q_v.pop_front();
        chk(xm == ex && ym == ey && zm == ez,
            $sformatf("K=%0d bit-exact: got %0d %0d %0d exp %0d %0d %0d", K, xm, ym, zm, ex, ey, ez));
        chk(cyc - t0 == N, $sformatf("K=%0d latency %0d cycles, expected %0d", K, cyc - t0, N));
        kg  = ref_gain(N);
        tol = 0.01 * $sqrt(real'(ax * ax + ay * ay)) + 8.0;
        if (!v) begin
          xr = ax * $cos(az / 8192.0);
          yr = ax * $sin(az / 8192.0);
          chk(fabs(xm * kg - xr) < tol && fabs(ym * kg - yr) < tol,
              $sformatf("K=%0d rotate accuracy: %f %f vs %f %f", K, xm * kg, ym * kg, xr, yr));
        end else begin
          xr = $sqrt(real'(ax * ax + ay * ay));
          zr = $atan2(real'(ay), real'(ax));
          // vectoring from the left half-plane does not converge (|z| <= 1.74 rad)
          if (fabs(zr) < 1.5)
            chk(fabs(xm * kg - xr) < tol && fabs(zm / 8192.0 - zr) < 0.01,
                $sformatf("K=%0d vectoring accuracy: %f %f vs %f %f", K, xm * kg, zm / 8192.0, xr, zr));
        end
        if (first_done < 0) first_done = cyc;
        last_done = cyc;
        finished++;
      end
    end
  end

  initial begin
    #1;
    g_dut[0].init = 1'b0; g_dut[1].init = 1'b0; g_dut[2].init = 1'b0; g_dut[3].init = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (g_dut[0].finished == NOPS && g_dut[1].finished == NOPS && g_dut[2].finished == NOPS &&
          g_dut[3].finished == NOPS);
    @(posedge clk);
    // throughput: K operations finish in K consecutive cycles every N cycles,
    // so NOPS operations take (NOPS/K - 1)*N + K - 1 cycles first to last
    for (int c = 0; c < 4; c++) begin
      int span;
      span = (c == 0) ? g_dut[0].last_done - g_dut[0].first_done
           : (c == 1) ? g_dut[1].last_done - g_dut[1].first_done
           : (c == 2) ? g_dut[2].last_done - g_dut[2].first_done
           :            g_dut[3].last_done - g_dut[3].first_done;
      chk(span == (NOPS / KS[c] - 1) * N + KS[c] - 1,
          $sformatf("K=%0d throughput: %0d cycles for %0d operations", KS[c], span, NOPS));
    end
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
