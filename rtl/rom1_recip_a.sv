// rom1_recip_a -- ROM1 mod m: residue modulo MOD of the signed first term of
// the reciprocal, |(+/-) {Ks/a}|_MOD, a = 64*aseg.
//
// The 64-entry table is addressed by {neg, aseg} (6 address bits, one FPGA
// LUT per output bit) and is filled at elaboration from rns_div_pkg, so the
// sign of the divisor is already folded into the stored residue.  Entries for
// aseg = 0 are 0; that case is served by ROM4.  Combinational.
module rom1_recip_a
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
      t[i] = residue_t'(signed_residue(rom1_value(i % (2 ** AW)), i >= 2 ** AW, int'(MOD)));
    return t;
  endfunction

  localparam table_t TABLE = build();

  assign r = TABLE[{neg, aseg}];
endmodule
