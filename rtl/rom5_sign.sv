// rom5_sign -- ROM5 sign(a): the one-bit select of the output multiplexer.
//
// It reports whether the upper divisor segment a is zero (signum of the
// non-negative a is 0).  When it is, every channel takes the reciprocal from
// ROM4 ({Ks/b}) instead of the two-term approximation.  A single instance
// serves all channels.  Combinational.
module rom5_sign
  import rns_div_pkg::*;
(
  input  logic [AW-1:0] aseg,
  output logic          a_zero
);
  assign a_zero = (aseg == '0);
endmodule
