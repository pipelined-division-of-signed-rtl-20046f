// mod_mult -- modulo-MOD multiplier of two residues, |x*y|_MOD.  Used as
// MULT1 (b times the correction coefficient) and MULT2 (reciprocal times the
// dividend residue) in every channel.  The 10-bit product is reduced by a
// constant modulus; for MOD = 32 this is a truncation.  Combinational.
module mod_mult
  import rns_div_pkg::*;
#(
  parameter int unsigned MOD = 31
) (
  input  residue_t x,
  input  residue_t y,
  output residue_t p
);
  logic [2*RW-1:0] prod;
  always_comb begin
    prod = x * y;
    p    = residue_t'(prod % (2*RW)'(MOD));
  end
endmodule
