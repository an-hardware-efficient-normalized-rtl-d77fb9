// ilog2_conv: inverse of log2_conv, from the log domain back to signed
// 32.32 fixed point.
//
// The integer part k of the log places a '1' at bit position k of the result
// and the 54 fraction bits follow directly below it: 2^k * (1 + f). Integer
// parts that would overflow the 32-bit integer field saturate to the largest
// positive magnitude; ones that fall below the last fraction bit give zero.
// The sign flag negates the result and the zero flag forces zero.
// Purely combinational. The procedure follows the design description; the
// saturation and underflow handling are this design's own choice.
module ilog2_conv
  import ncc_pkg::*;
(
  input  lg_t  x,
  output fx_t  y
);

  logic signed [LG_INT-1:0] k;
  logic [LG_FRAC:0]         mant;    // 1.f
  logic [2*FX_W-1:0]        wide;
  logic [FX_W-1:0]          mag;
  int                       sh;

  always_comb begin
    k    = x.val[LG_W-1 -: LG_INT];
    mant = {1'b1, x.val[LG_FRAC-1:0]};
    // the leading one must land on bit k + FX_FRAC
    sh   = int'(k) + FX_FRAC - LG_FRAC;
    wide = (2*FX_W)'(mant);
    if (sh >= 0) wide = wide << sh;
    else         wide = wide >> (-sh);
    if (int'(k) >= FX_INT - 1)         mag = {1'b0, {(FX_W-1){1'b1}}};
    else if (int'(k) < -FX_FRAC - 1)   mag = '0;
    else                               mag = wide[FX_W-1:0];
    if (x.zero)     y = '0;
    else if (x.neg) y = -fx_t'(mag);
    else            y = fx_t'(mag);
  end

endmodule
