// cordic_stage: one CORDIC micro-rotation on a circle (m = 1).
//
//   x' = x - d * y * 2^-i,   y' = y + d * x * 2^-i,   z' = z - d * e_i
//
// The direction d is +1 or -1. A multiplexer controlled by the mode picks the
// sign that decides it: the sign of z in rotate mode (d = sgn z, with z = 0
// counted as positive) and the sign of y in vectoring mode (d = -sgn y). Each
// of the three coordinates has one carry-select adder; a subtraction is made
// by inverting the other operand with a row of XOR gates and feeding a 1 into
// the adder's carry-in (the LSB two's-complement correction), so the three
// adders share a single control bit. The two shifters scale x and y by 2^-i
// with i = STAGE + K*round: the constant part STAGE is wiring, the part
// K*round is a logarithmic shifter with step K (no shifter at all when the
// stage always runs the same iteration, K = N). The structure (shifters, XOR
// rows, carry-select adders, sign multiplexer) follows the reference
// architecture; splitting the shift into a fixed and a stepped part is this
// design's way of using fewer shifter levels in unrolled stages. Purely
// combinational.
module cordic_stage
  import cordic_pkg::*;
#(
  parameter int W     = 16,
  parameter int ZW    = W,
  parameter int N     = 10,
  parameter int K     = 1,
  parameter int STAGE = 0,
  parameter int RW    = (N / K > 1) ? $clog2(N / K) : 1
) (
  input  cordic_mode_e         mode,
  input  logic [RW-1:0]        round,
  input  logic signed [W-1:0]  x,
  input  logic signed [W-1:0]  y,
  input  logic signed [ZW-1:0] z,
  input  logic signed [ZW-1:0] e,      // step angle e_i from the ROM
  output logic signed [W-1:0]  x_nxt,
  output logic signed [W-1:0]  y_nxt,
  output logic signed [ZW-1:0] z_nxt
);
  logic signed [W-1:0] x_fix, y_fix, x_sh, y_sh;
  logic                sub;   // 1: d = +1 (x and z subtract, y adds)

  // fixed part of the shift
  if (STAGE >= W) begin : g_fix_all
    assign x_fix = {W{x[W-1]}};
    assign y_fix = {W{y[W-1]}};
  end else begin : g_fix
    assign x_fix = x >>> STAGE;
    assign y_fix = y >>> STAGE;
  end

  // programmable part of the shift
  if (N / K > 1) begin : g_shift
    log_shifter #(.WIDTH(W), .AMT_W(RW), .STEP(K)) u_shx (.din(x_fix), .amt(round), .dout(x_sh));
    log_shifter #(.WIDTH(W), .AMT_W(RW), .STEP(K)) u_shy (.din(y_fix), .amt(round), .dout(y_sh));
  end else begin : g_noshift
    assign x_sh = x_fix;
    assign y_sh = y_fix;
  end

  assign sub = (mode == MODE_ROTATE) ? ~z[ZW-1] : y[W-1];

  csel_adder #(.WIDTH(W)) u_addx (
    .a(x), .b(y_sh ^ {W{sub}}), .cin(sub), .sum(x_nxt), .cout()
  );
  csel_adder #(.WIDTH(W)) u_addy (
    .a(y), .b(x_sh ^ {W{~sub}}), .cin(~sub), .sum(y_nxt), .cout()
  );
  csel_adder #(.WIDTH(ZW)) u_addz (
    .a(z), .b(e ^ {ZW{sub}}), .cin(sub), .sum(z_nxt), .cout()
  );
endmodule
