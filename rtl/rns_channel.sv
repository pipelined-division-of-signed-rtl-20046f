// rns_channel -- one residue channel of the divider for the modulus MOD.
//
// Every channel has the same structure: four reciprocal look-ups, the
// correction product, the subtraction that forms the reciprocal residue, the
// multiplexer that picks the a = 0 reciprocal, and the product with the
// dividend residue.  The output is the residue |X * {Ks/Y}|_MOD, i.e. the
// quotient scaled up by Ks, which the scaler then divides by Ks.
//
// Pipeline (one register after each step, a new operand every cycle):
//   stage 1  ROM1 {Ks/a}, ROM2 {Ks/(a(a+K))}, ROM3 |b|, ROM4 {Ks/b}
//   stage 2  MULT1  t = |b * ROM2|
//   stage 3  BA     r = |ROM1 - t|
//   stage 4  MUX    r' = a_zero ? ROM4 : r ;  MULT2  p = |r' * x|
// Latency 4 cycles from d/a_zero/x to p.  The order ROM - MULT1 - BA follows
// the divider's description; placing the multiplexer in front of MULT2, so
// that one multiplier serves both reciprocal sources, is this
// implementation's reading of the block diagram.  No reset: the registers
// hold data only, validity is tracked by the top level.
module rns_channel
  import rns_div_pkg::*;
#(
  parameter int unsigned MOD = 31
) (
  input  logic        clk,
  input  divisor_sm_t d,        // divisor in sign/segment form
  input  logic        a_zero,   // ROM5 output for this divisor
  input  residue_t    x,        // dividend residue |X|_MOD
  output residue_t    p         // |X * {Ks/Y}|_MOD, 4 cycles later
);
  // stage 1: look-ups
  residue_t rom1_c, rom2_c, rom3_c, rom4_c;
  residue_t rom1_q, rom2_q, rom3_q, rom4_q, x_q1;
  logic     az_q1;

  rom1_recip_a   #(.MOD(MOD)) u_rom1 (.neg(d.neg), .aseg(d.aseg), .r(rom1_c));
  rom2_recip_aak #(.MOD(MOD)) u_rom2 (.neg(d.neg), .aseg(d.aseg), .r(rom2_c));
  rom3_b_residue #(.MOD(MOD)) u_rom3 (.b(d.b), .r(rom3_c));
  rom4_recip_b   #(.MOD(MOD)) u_rom4 (.neg(d.neg), .b(d.b), .r(rom4_c));

  always_ff @(posedge clk) begin
    rom1_q <= rom1_c;
    rom2_q <= rom2_c;
    rom3_q <= rom3_c;
    rom4_q <= rom4_c;
    x_q1   <= x;
    az_q1  <= a_zero;
  end

  // stage 2: MULT1
  residue_t mult1_c, mult1_q, rom1_q2, rom4_q2, x_q2;
  logic     az_q2;

  mod_mult #(.MOD(MOD)) u_mult1 (.x(rom3_q), .y(rom2_q), .p(mult1_c));

  always_ff @(posedge clk) begin
    mult1_q <= mult1_c;
    rom1_q2 <= rom1_q;
    rom4_q2 <= rom4_q;
    x_q2    <= x_q1;
    az_q2   <= az_q1;
  end

  // stage 3: BA
  residue_t ba_c, ba_q, rom4_q3, x_q3;
  logic     az_q3;

  mod_sub #(.MOD(MOD)) u_ba (.x(rom1_q2), .y(mult1_q), .d(ba_c));

  always_ff @(posedge clk) begin
    ba_q    <= ba_c;
    rom4_q3 <= rom4_q2;
    x_q3    <= x_q2;
    az_q3   <= az_q2;
  end

  // stage 4: MUX and MULT2
  residue_t recip, mult2_c;

  assign recip = az_q3 ? rom4_q3 : ba_q;

  mod_mult #(.MOD(MOD)) u_mult2 (.x(recip), .y(x_q3), .p(mult2_c));

  always_ff @(posedge clk) p <= mult2_c;
endmodule
