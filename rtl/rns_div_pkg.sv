// rns_div_pkg -- shared constants, types and table-building functions of the
// pipelined signed residue-number-system (RNS) divider.
//
// The divider computes Q ~ X / Y where the dividend X arrives as residues in
// the base {32, 31, 29, 23, 21} (dynamic range M = 13 894 944) and the divisor
// Y arrives as a 12-bit two's complement word.  The reciprocal of Y is built
// from two table look-ups addressed by the upper and lower bit segments of |Y|:
//     {Ks/Y} ~ {Ks/a} - b * {Ks/(a*(a+K))},   a = |Y| with the 6 low bits cleared,
//                                             b = the 6 low bits of |Y|,
// with the scale Ks = 32*31*23*7 = 159712 and the constant K = 49.07 that
// balances the approximation error over b.  For a = 0 the reciprocal {Ks/b}
// is looked up directly.  {.} is rounding to nearest, halves rounded up.
//
// The base, Ks, K, the 1+5+6 bit split of the divisor and the rounding of
// table entries follow the design this RTL implements.  K is held as the
// integer 4907 = 100*K so that every table is computed with exact integer
// arithmetic at elaboration time; this, the rounding of halves and the CRT
// constants below are this implementation's choices.
package rns_div_pkg;

  localparam int NCH = 5;                 // number of residue channels
  localparam int RW  = 5;                 // residue width (all moduli <= 32)
  localparam int YW  = 12;                // divisor width, two's complement
  localparam int BW  = 6;                 // width of the b segment
  localparam int AW  = YW - 1 - BW;       // width of the a segment (5)

  typedef logic [RW-1:0] residue_t;
  typedef logic [NCH-1:0][RW-1:0] residue_vec_t;   // index 0 = modulus 32

  localparam int unsigned MODULI [NCH] = '{32, 31, 29, 23, 21};
  localparam longint M_RANGE = 64'd13894944;       // product of the moduli
  localparam longint KS      = 64'd159712;         // reciprocal scale 32*31*23*7
  localparam longint K_X100  = 64'd4907;           // 100 * K, K = 49.07

  // Divisor in sign / segment form, as produced by the scaling converter.
  typedef struct packed {
    logic          neg;    // Y < 0
    logic [AW-1:0] aseg;   // |Y| >> 6, so that a = 64 * aseg
    logic [BW-1:0] b;      // |Y| mod 64
  } divisor_sm_t;

  // {Ks / a} for a = 64*aseg, aseg > 0; halves round up.
  function automatic longint rom1_value(input int aseg);
    longint a;
    a = longint'(aseg) << BW;
    if (aseg == 0) return 0;
    return (2 * KS + a) / (2 * a);
  endfunction

  // {Ks / (a*(a+K))} for a = 64*aseg, aseg > 0, evaluated as
  // {100*Ks / (a*(100*a + 100*K))}.
  function automatic longint rom2_value(input int aseg);
    longint a, den;
    a = longint'(aseg) << BW;
    if (aseg == 0) return 0;
    den = a * (100 * a + K_X100);
    return (2 * 100 * KS + den) / (2 * den);
  endfunction

  // {Ks / b} for the a = 0 path; b = 0 (a zero divisor) gives 0.
  function automatic longint rom4_value(input int b);
    longint bl;
    bl = longint'(b);
    if (b == 0) return 0;
    return (2 * KS + bl) / (2 * bl);
  endfunction

  // Residue modulo m of (neg ? -v : v), v >= 0.
  function automatic int signed_residue(input longint v, input logic neg, input int m);
    longint r, ml;
    ml = longint'(m);
    r  = v % ml;
    if (neg && r != 0) r = ml - r;
    return int'(r);
  endfunction

  // CRT weight of the channel with modulus m = m_i: M_i * |M_i^-1|_{m_i}, with M_i = M / m_i.
  function automatic longint crt_weight(input int unsigned m);
    longint mi, big, inv;
    mi  = longint'(m);
    big = M_RANGE / mi;
    inv = 0;
    for (longint k = 1; k < mi; k++)
      if (((big % mi) * k) % mi == 1) inv = k;
    return big * inv;
  endfunction

endpackage
