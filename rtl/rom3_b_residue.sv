// rom3_b_residue -- ROM3 mod m: residue |b|_MOD of the 6-bit lower divisor
// segment b (unsigned; the sign lives in ROM1/ROM2).  64-entry table filled
// at elaboration.  Combinational.
module rom3_b_residue
  import rns_div_pkg::*;
#(
  parameter int unsigned MOD = 32
) (
  input  logic [BW-1:0] b,
  output residue_t      r
);
  localparam int DEPTH = 2 ** BW;
  typedef residue_t table_t [DEPTH];

  function automatic table_t build();
    table_t t;
    for (int i = 0; i < DEPTH; i++)
      t[i] = residue_t'(i % int'(MOD));
    return t;
  endfunction

  localparam table_t TABLE = build();

  assign r = TABLE[b];
endmodule
