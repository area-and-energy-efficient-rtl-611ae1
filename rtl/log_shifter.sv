// log_shifter: logarithmic arithmetic right shifter.
//
// The shift is done in AMT_W levels of 2:1 multiplexers; level b shifts by
// STEP * 2^b when bit b of amt is set, so the total shift is STEP * amt. The
// vacated bits are filled with copies of the sign bit, which makes the result
// din * 2^-(STEP*amt) rounded toward minus infinity. STEP > 1 is used by an
// unrolled CORDIC stage whose shift is a fixed offset plus a multiple of the
// unrolling factor: the fixed part is wiring outside this block and only the
// multiple needs multiplexer levels. The multiplexer-level structure is the
// reference architecture's; STEP is this design's addition. Purely
// combinational.
module log_shifter #(
  parameter int WIDTH = 16,
  parameter int AMT_W = 4,
  parameter int STEP  = 1
) (
  input  logic signed [WIDTH-1:0] din,
  input  logic        [AMT_W-1:0] amt,
  output logic signed [WIDTH-1:0] dout
);
  logic signed [WIDTH-1:0] lvl [AMT_W+1];

  assign lvl[0] = din;
  for (genvar b = 0; b < AMT_W; b++) begin : g_lvl
    localparam int SH = STEP << b;
    if (SH >= WIDTH) begin : g_all
      assign lvl[b+1] = amt[b] ? {WIDTH{lvl[b][WIDTH-1]}} : lvl[b];
    end else begin : g_part
      assign lvl[b+1] = amt[b] ? (lvl[b] >>> SH) : lvl[b];
    end
  end
  assign dout = lvl[AMT_W];
endmodule
