// fp_prenorm: floating-point pre-processing in front of an integer CORDIC.
//
// A rotation on a circle keeps the length of (x, y) constant apart from the
// fixed gain, so x and y can share one exponent for the whole operation and
// the integer CORDIC can do the rest. This block aligns the two inputs: the
// exponents are subtracted, the absolute difference drives two mantissa
// shifters, the mantissa with the smaller exponent is shifted right by it,
// and the larger exponent is passed on as the exponent of the result. The
// angle z0 is turned into a fixed-point value by shifting its mantissa by
// its own exponent. Every output gets two extra bits at the top: one for the
// growth by up to sqrt(2) during the rotation, one for the gain that is
// corrected only at the end.
//
// Number format (this design's choice): a mantissa is a two's-complement
// fraction of NM bits, value = man * 2^-(NM-1) * 2^exp, with a two's-complement
// exponent of EW bits. Outputs x_i, y_i and z_i are NM+2 bits with the same
// NM-1 fractional bits; z_i is in radians, so it needs |z0| < 4, and z_exp
// above +2 overflows. Purely combinational.
module fp_prenorm #(
  parameter int NM = 28,
  parameter int EW = 8
) (
  input  logic signed [NM-1:0] x_man,
  input  logic signed [EW-1:0] x_exp,
  input  logic signed [NM-1:0] y_man,
  input  logic signed [EW-1:0] y_exp,
  input  logic signed [NM-1:0] z_man,
  input  logic signed [EW-1:0] z_exp,
  output logic signed [NM+1:0] x_i,
  output logic signed [NM+1:0] y_i,
  output logic signed [NM+1:0] z_i,
  output logic signed [EW-1:0] exp_o
);
  localparam int OW = NM + 2;

  logic signed [EW:0] diff;
  logic        [EW:0] adiff;
  logic               y_larger;   // y has the larger exponent: shift x

  function automatic logic signed [OW-1:0] shr(input logic signed [OW-1:0] v,
                                               input logic [EW:0] amt);
    logic signed [OW-1:0] r;
    if (amt >= (EW+1)'(OW)) r = {OW{v[OW-1]}};
    else                    r = v >>> amt;
    return r;
  endfunction

  always_comb begin
    diff     = (EW+1)'(x_exp) - (EW+1)'(y_exp);
    y_larger = diff[EW];
    adiff    = y_larger ? -diff : diff;
    x_i      = y_larger ? shr(OW'(x_man), adiff) : OW'(x_man);
    y_i      = y_larger ? OW'(y_man) : shr(OW'(y_man), adiff);
    exp_o    = y_larger ? y_exp : x_exp;
    if (z_exp[EW-1]) z_i = shr(OW'(z_man), (EW+1)'(-(EW+1)'(z_exp)));
    else             z_i = OW'(z_man) <<< z_exp;
  end
endmodule
