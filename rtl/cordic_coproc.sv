// cordic_coproc: floating-point CORDIC co-processor tightly coupled to an ASIP.
//
// The processor hands over three floating-point operands (x0, y0, z0, each a
// mantissa and an exponent) straight from its register file together with
// the mode, and pulses start. The operands go through fp_prenorm (exponent
// alignment of x and y, fixed-point conversion of z, two guard bits) into an
// inner integer CORDIC of NM+2 bits that runs N iterations. The processor's
// control unit waits while busy is high (the processor is halted during the
// multi-cycle CORDIC operation). When the inner CORDIC finishes, the results
// are stored in result registers and done pulses for one cycle.
//
// Results: x_res, y_res, z_res are the NM+1 most significant bits of the inner
// result (the LSB is dropped), so their value is res * 2^-(NM-2) * 2^exp_res
// for x and y and res * 2^-(NM-2) radians for z. The multiplication of x and
// y by the CORDIC scale constant K is post-processing: with kcorr = 0 it is
// left to the processor (raw results), with kcorr = 1 the co-processor does
// it with a shift-and-add k_correction before the result registers. The
// mantissas are never re-normalised.
//
// The operand and result widths, the two guard bits and the 30 iterations
// follow the reference system, which also names pre- and post-processing in
// hardware as an option; the start/busy/done handshake, the number format,
// the kcorr selection and doing the pre-processing in hardware (rather than
// in the processor) are this design's choices.
//
// Timing: start is accepted in a cycle where busy is low; busy goes high on
// that edge; N rising edges later busy drops, done is high for one cycle and
// the result registers hold the result (N cycles per operation). Active-low asynchronous reset.
module cordic_coproc
  import cordic_pkg::*;
#(
  parameter int NM = 28,
  parameter int EW = 8,
  parameter int N  = 30,
  parameter int K  = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  cordic_mode_e         mode,
  input  logic                 kcorr,   // 1: multiply x, y by K in hardware
  input  logic signed [NM-1:0] x_man,
  input  logic signed [EW-1:0] x_exp,
  input  logic signed [NM-1:0] y_man,
  input  logic signed [EW-1:0] y_exp,
  input  logic signed [NM-1:0] z_man,
  input  logic signed [EW-1:0] z_exp,
  output logic                 busy,
  output logic                 done,
  output logic signed [NM:0]   x_res,
  output logic signed [NM:0]   y_res,
  output logic signed [NM:0]   z_res,
  output logic signed [EW-1:0] exp_res
);
  localparam int IW = NM + 2;

  logic signed [IW-1:0] x_i, y_i, z_i, x_m, y_m, z_m, x_k, y_k, x_r, y_r;
  logic                 kcorr_q;
  logic signed [EW-1:0] exp_i, exp_q;
  logic                 accept, core_ready, core_done;

  fp_prenorm #(.NM(NM), .EW(EW)) u_pre (
    .x_man(x_man), .x_exp(x_exp),
    .y_man(y_man), .y_exp(y_exp),
    .z_man(z_man), .z_exp(z_exp),
    .x_i(x_i), .y_i(y_i), .z_i(z_i), .exp_o(exp_i)
  );

  assign accept = start && !busy;

  cordic_core #(.W(IW), .ZW(IW), .FRAC(NM - 1), .N(N), .K(K)) u_core (
    .clk  (clk),
    .rst_n(rst_n),
    .init (accept),
    .mode (mode),
    .x0   (x_i),
    .y0   (y_i),
    .z0   (z_i),
    .ready(core_ready),
    .done (core_done),
    .x_m  (x_m),
    .y_m  (y_m),
    .z_m  (z_m)
  );

  // optional hardware post-processing: correction by the scale constant
  k_correction #(.W(IW), .N(N)) u_kcorr (
    .x_in(x_m), .y_in(y_m), .x_out(x_k), .y_out(y_k)
  );
  assign x_r = kcorr_q ? x_k : x_m;
  assign y_r = kcorr_q ? y_k : y_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      kcorr_q <= 1'b0;
      done    <= 1'b0;
      exp_q   <= '0;
      x_res   <= '0;
      y_res   <= '0;
      z_res   <= '0;
      exp_res <= '0;
    end else begin
      done <= 1'b0;
      if (accept) begin
        busy    <= 1'b1;
        exp_q   <= exp_i;
        kcorr_q <= kcorr;
      end
      if (busy && core_done) begin
        busy    <= 1'b0;
        done    <= 1'b1;
        x_res   <= x_r[IW-1:1];
        y_res   <= y_r[IW-1:1];
        z_res   <= z_m[IW-1:1];
        exp_res <= exp_q;
      end
    end
  end

`ifndef SYNTHESIS
  // one operation at a time: the core is always free when a start is accepted
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> core_ready)
    else $error("cordic_coproc: core busy on start");
`endif
endmodule
