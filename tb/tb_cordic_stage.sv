// tb_cordic_stage: random test of one micro-rotation in both modes, for a
// 16-bit iterative stage (shift 0..9 from the round) and for the second stage
// of a 2-way unrolled ring (shift 1 + 2*round). The step angle input is
// driven with random values; outputs are compared bit exactly with
// x -/+ y*2^-i, y +/- x*2^-i, z -/+ e.
module tb_cordic_stage;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;
  int checks = 0, failures = 0;

  cordic_mode_e       mode;
  logic [3:0]         rnd1;
  logic [2:0]         rnd2;
  logic signed [15:0] x, y, z, e;
  logic signed [15:0] x1, y1, z1, x2, y2, z2;

  cordic_stage #(.W(16), .N(10), .K(1), .STAGE(0)) u1 (
    .mode, .round(rnd1), .x, .y, .z, .e, .x_nxt(x1), .y_nxt(y1), .z_nxt(z1));
  cordic_stage #(.W(16), .N(10), .K(2), .STAGE(1)) u2 (
    .mode, .round(rnd2), .x, .y, .z, .e, .x_nxt(x2), .y_nxt(y2), .z_nxt(z2));

  function automatic void expect_iter(input int i, output longint xe, output longint ye,
                                      output longint ze);
    bit pos_d;
    pos_d = (mode == MODE_VECTOR) ? (y < 0) : (z >= 0);
    xe = wrap(pos_d ? x - (longint'(y) >>> i) : x + (longint'(y) >>> i), 16);
    ye = wrap(pos_d ? y + (longint'(x) >>> i) : y - (longint'(x) >>> i), 16);
    ze = wrap(pos_d ? z - e : z + e, 16);
  endfunction

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s mode=%0d x=%0d y=%0d z=%0d: got %0d exp %0d", what, mode, x, y, z, got, exp);
    end
  endtask

  initial begin
    longint xe, ye, ze;
    for (int t = 0; t < 3000; t++) begin
      mode = cordic_mode_e'(t[0]);
      x    = 16'($urandom);
      y    = 16'($urandom);
      z    = (t % 7 == 0) ? 16'sd0 : 16'($urandom);
      e    = 16'($urandom_range(0, 8000));
      rnd1 = 4'($urandom_range(0, 9));
      rnd2 = 3'($urandom_range(0, 4));
      #1;
      expect_iter(int'(rnd1), xe, ye, ze);
      chk(x1, xe, "K1 x"); chk(y1, ye, "K1 y"); chk(z1, ze, "K1 z");
      expect_iter(1 + 2 * int'(rnd2), xe, ye, ze);
      chk(x2, xe, "K2 x"); chk(y2, ye, "K2 y"); chk(z2, ze, "K2 z");
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
