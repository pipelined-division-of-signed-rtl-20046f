// rom2_recip_aak -- ROM2 mod m: residue modulo MOD of the signed correction
// coefficient |(+/-) {Ks/(a*(a+K))}|_MOD, a = 64*aseg, K = 49.07.
//
// Addressed by {neg, aseg} (6 bits); table filled at elaboration.  The
// coefficient carries the divisor's sign so that b*coefficient (MULT1) can be
// subtracted from ROM1's output without further sign handling.  Entries for
// aseg = 0 are 0.  Combinational.
module rom2_recip_aak
  import rns_div_pkg::*;
#(
  parameter int unsigned MOD = 32
) (
  input  logic          neg,
  input  logic [AW-1:0] aseg,
  output residue_t      r
);
  localparam int DEPTH = 2 ** (AW + 1);
  typedef residue_t table_t [DEPTH];

  function automatic table_t build();
    table_t t;
    for (int i = 0; i < DEPTH; i++)
      t[i] = residue_t'(signed_residue(rom2_value(i % (2 ** AW)), i >= 2 ** AW, int'(MOD)));
    return t;
  endfunction

  localparam table_t TABLE = build();

  assign r = TABLE[{neg, aseg}];
endmodule
