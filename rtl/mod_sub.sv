// mod_sub -- BA mod m: modulo-MOD subtractor |x - y|_MOD of two residues in
// [0, MOD).  A borrow is corrected by adding MOD back.  Combinational.
module mod_sub
  import rns_div_pkg::*;
#(
  parameter int unsigned MOD = 31
) (
  input  residue_t x,
  input  residue_t y,
  output residue_t d
);
  logic [RW:0] diff;
  always_comb begin
    diff = {1'b0, x} - {1'b0, y};
    if (diff[RW]) diff = diff + (RW+1)'(MOD);
    d = diff[RW-1:0];
  end
endmodule
