// log2_conv: approximate base-2 logarithm of a signed fixed-point number.
//
// The position of the most significant '1' of |x| gives the integer part of
// the result and the bits below that '1', left-aligned, give the fraction
// (the classic piecewise-linear approximation log2(2^k*(1+f)) ~ k + f).
// IN_FRAC moves the binary point of the input: the integer part is k-IN_FRAC.
// The sign of x and a zero flag travel beside the magnitude log, so a
// product becomes a sum and a square a left shift by one.
// Purely combinational. The 10.54 output format is the one given for the
// design; treating signed inputs as sign + magnitude is this design's choice.
module log2_conv
  import ncc_pkg::*;
#(
  parameter int IN_W    = 9,   // width of the signed input
  parameter int IN_FRAC = 0    // fraction bits of the input
) (
  input  logic signed [IN_W-1:0] x,
  output lg_t                    y
);

  logic [IN_W-1:0]          mag;
  logic [$clog2(IN_W)-1:0]  msb;
  logic [IN_W-1:0]          norm;
  logic [IN_W-2+LG_FRAC:0]  ext;

  always_comb begin
    mag = x[IN_W-1] ? IN_W'(-x) : IN_W'(x);
    msb = '0;
    for (int i = 0; i < IN_W; i++)
      if (mag[i]) msb = ($clog2(IN_W))'(i);
    // bring the leading one to bit IN_W-1; the bits under it are the fraction
    norm = mag << (IN_W - 1 - int'(msb));
    ext  = {norm[IN_W-2:0], {LG_FRAC{1'b0}}};
    y.zero = (mag == '0);
    y.neg  = x[IN_W-1];
    y.val  = {LG_INT'(signed'(int'(msb) - IN_FRAC)), ext[IN_W-2+LG_FRAC -: LG_FRAC]};
  end

endmodule
