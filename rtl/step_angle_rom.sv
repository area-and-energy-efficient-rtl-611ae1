// step_angle_rom: step-angle look-up table of one CORDIC stage.
//
// A stage at position STAGE of a ring of K unrolled stages performs the
// iterations i = STAGE, STAGE + K, STAGE + 2K, ... The ROM is addressed by the
// round r of the operation and returns e_i = atan(2^-i) with i = r*K + STAGE,
// as a two's-complement radian value with FRAC fractional bits. The contents
// are computed at elaboration time from the arctangent; with K = N the ROM
// holds a single constant. The plain series i = 0..N-1 is used (no repeated
// angles); the angle format is this design's choice. Purely combinational
// (a ROM read).
module step_angle_rom
  import cordic_pkg::*;
#(
  parameter int ZW    = 16,
  parameter int FRAC  = ZW - 3,
  parameter int N     = 10,
  parameter int K     = 1,
  parameter int STAGE = 0,
  parameter int RW    = (N / K > 1) ? $clog2(N / K) : 1
) (
  input  logic [RW-1:0]        round,
  output logic signed [ZW-1:0] e
);
  localparam int ROUNDS = N / K;

  logic signed [ZW-1:0] rom [ROUNDS];
  for (genvar r = 0; r < ROUNDS; r++) begin : g_rom
    assign rom[r] = ZW'(step_angle(r * K + STAGE, FRAC));
  end

  always_comb begin
    e = '0;
    for (int r = 0; r < ROUNDS; r++)
      if (int'(round) == r) e = rom[r];
  end
endmodule
