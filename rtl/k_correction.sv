// k_correction: multiplies the CORDIC outputs by the scale constant K.
//
// The micro-rotations of the CORDIC stretch the vector by 1/K, where
// K = prod_{i<N} 1/sqrt(1 + 2^-2i) depends only on the number of iterations
// (K = 0.6073 for N = 10). This block computes x*K and y*K with shifts and
// additions only: K is rounded to KF fractional bits, recoded into canonical
// signed digits (+1/-1 digits, no two adjacent), and one shifted copy of the
// input is added or subtracted per non-zero digit. The sum is rounded to the
// nearest integer (ties toward plus infinity). For N = 10 and KF = 18 the
// recoded constant has 7 non-zero digits. The angle z needs no correction and
// does not pass through this block. Correcting by shift and add with a CSD
// constant follows the reference architecture; KF and the rounding are this
// design's choices. Purely combinational.
module k_correction
  import cordic_pkg::*;
#(
  parameter int W  = 16,
  parameter int N  = 10,
  parameter int KF = W + 2
) (
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out
);
  localparam longint KQ   = gain_k_fixed(N, KF);
  localparam longint DPOS = csd_digits(KQ, 1'b0);
  localparam longint DNEG = csd_digits(KQ, 1'b1);
  localparam int     AW   = W + KF + 2;

  function automatic logic signed [W-1:0] scale(input logic signed [W-1:0] v);
    logic signed [AW-1:0] acc, ve;
    ve  = AW'(v);
    acc = AW'(longint'(1) << (KF - 1));   // rounding constant
    for (int b = 0; b <= KF; b++) begin
      if (DPOS[b]) acc = acc + (ve <<< b);
      if (DNEG[b]) acc = acc - (ve <<< b);
    end
    return W'(acc >>> KF);
  endfunction

  assign x_out = scale(x_in);
  assign y_out = scale(y_in);
endmodule
