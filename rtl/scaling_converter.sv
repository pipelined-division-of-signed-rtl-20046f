// scaling_converter -- splits the 12-bit two's complement divisor Y into the
// sign / a-segment / b-segment word that addresses the reciprocal tables.
//
// Output fields: neg = (Y < 0); aseg = bits 10..6 of |Y| (so the upper part of
// the divisor is a = 64*aseg); b = bits 5..0 of |Y|.  The only value whose
// magnitude needs 12 bits, Y = -2048, is saturated to magnitude 2047 so that
// the word stays in the sign + 11-bit form (this saturation is a choice of
// this implementation).  Purely combinational; the divider registers the
// result in its first pipeline stage.
module scaling_converter
  import rns_div_pkg::*;
(
  input  logic signed [YW-1:0] y,
  output divisor_sm_t          d
);
  logic [YW-1:0]   mag_full;
  logic [YW-2:0]   mag;

  always_comb begin
    mag_full = y[YW-1] ? YW'(-y) : y;
    // -2048 negates to itself: clamp it to the largest 11-bit magnitude
    mag      = mag_full[YW-1] ? {(YW-1){1'b1}} : mag_full[YW-2:0];
    d.neg    = y[YW-1];
    d.aseg   = mag[YW-2:BW];
    d.b      = mag[BW-1:0];
  end
endmodule
