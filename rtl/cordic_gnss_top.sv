// cordic_gnss_top: the two CORDIC macros of a digital GNSS receiver.
//
// 1. Baseband macro: a fully iterative (K = 1) 16-bit integer CORDIC with
//    10 iterations for the fixed-point baseband processing (carrier rotation,
//    phase and magnitude of correlator outputs), followed by the shift-and-add
//    correction by the scale constant. bb_x_out/bb_y_out are corrected,
//    bb_z_out is the residual angle (rotate) or the accumulated angle
//    (vectoring), in radians with BB_W-3 fractional bits.
// 2. Co-processor: the floating-point CORDIC attached to the navigation ASIP
//    for the position/velocity/time solution, with 28-bit mantissas, a 30-bit
//    inner integer CORDIC and 30 iterations. The ASIP itself is outside this
//    design; its register-file and control-unit signals are the cp_* ports.
//
// The word lengths and iteration counts are those of the reference receiver;
// putting both macros in one top with separate ports is this design's choice.
// The two macros share only the clock and reset. Timing of each side is that
// of cordic_core (bb_*) and cordic_coproc (cp_*).
module cordic_gnss_top
  import cordic_pkg::*;
#(
  parameter int BB_W  = 16,
  parameter int BB_N  = 10,
  parameter int BB_K  = 1,
  parameter int CP_NM = 28,
  parameter int CP_EW = 8,
  parameter int CP_N  = 30,
  parameter int CP_K  = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // baseband macro
  input  logic                    bb_init,
  input  cordic_mode_e            bb_mode,
  input  logic signed [BB_W-1:0]  bb_x0,
  input  logic signed [BB_W-1:0]  bb_y0,
  input  logic signed [BB_W-1:0]  bb_z0,
  output logic                    bb_ready,
  output logic                    bb_done,
  output logic signed [BB_W-1:0]  bb_x_out,
  output logic signed [BB_W-1:0]  bb_y_out,
  output logic signed [BB_W-1:0]  bb_z_out,
  // co-processor
  input  logic                    cp_start,
  input  cordic_mode_e            cp_mode,
  input  logic                    cp_kcorr,
  input  logic signed [CP_NM-1:0] cp_x_man,
  input  logic signed [CP_EW-1:0] cp_x_exp,
  input  logic signed [CP_NM-1:0] cp_y_man,
  input  logic signed [CP_EW-1:0] cp_y_exp,
  input  logic signed [CP_NM-1:0] cp_z_man,
  input  logic signed [CP_EW-1:0] cp_z_exp,
  output logic                    cp_busy,
  output logic                    cp_done,
  output logic signed [CP_NM:0]   cp_x_res,
  output logic signed [CP_NM:0]   cp_y_res,
  output logic signed [CP_NM:0]   cp_z_res,
  output logic signed [CP_EW-1:0] cp_exp_res
);
  logic signed [BB_W-1:0] bb_x_m, bb_y_m;

  cordic_core #(.W(BB_W), .ZW(BB_W), .N(BB_N), .K(BB_K)) u_bb_core (
    .clk  (clk),
    .rst_n(rst_n),
    .init (bb_init),
    .mode (bb_mode),
    .x0   (bb_x0),
    .y0   (bb_y0),
    .z0   (bb_z0),
    .ready(bb_ready),
    .done (bb_done),
    .x_m  (bb_x_m),
    .y_m  (bb_y_m),
    .z_m  (bb_z_out)
  );

  k_correction #(.W(BB_W), .N(BB_N)) u_bb_kcorr (
    .x_in (bb_x_m),
    .y_in (bb_y_m),
    .x_out(bb_x_out),
    .y_out(bb_y_out)
  );

  cordic_coproc #(.NM(CP_NM), .EW(CP_EW), .N(CP_N), .K(CP_K)) u_coproc (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (cp_start),
    .mode   (cp_mode),
    .kcorr  (cp_kcorr),
    .x_man  (cp_x_man),
    .x_exp  (cp_x_exp),
    .y_man  (cp_y_man),
    .y_exp  (cp_y_exp),
    .z_man  (cp_z_man),
    .z_exp  (cp_z_exp),
    .busy   (cp_busy),
    .done   (cp_done),
    .x_res  (cp_x_res),
    .y_res  (cp_y_res),
    .z_res  (cp_z_res),
    .exp_res(cp_exp_res)
  );
endmodule
