// rom4_recip_b -- ROM4 mod m: residue modulo MOD of the signed reciprocal
// |(+/-) {Ks/b}|_MOD used when the upper segment a is zero (|Y| < 64).
//
// Addressed by {neg, b} (7 bits; the sign bit is this implementation's
// addition so the stored reciprocal carries the divisor's sign like ROM1 and
// ROM2).  b = 0, a zero divisor, stores 0: the divider has no zero-divisor
// detection.  Combinational.
module rom4_recip_b
  import rns_div_pkg::*;
#(
  parameter int unsigned MOD = 32
) (
  input  logic          neg,
  input  logic [BW-1:0] b,
  output residue_t      r
);
  localparam int DEPTH = 2 ** (BW + 1);
  typedef residue_t table_t [DEPTH];

  function automatic table_t build();
    table_t t;
    for (int i = 0; i < DEPTH; i++)
      t[i] = residue_t'(signed_residue(rom4_value(i % (2 ** BW)), i >= 2 ** BW, int'(MOD)));
    return t;
  endfunction

  localparam table_t TABLE = build();

  assign r = TABLE[{neg, b}];
endmodule
