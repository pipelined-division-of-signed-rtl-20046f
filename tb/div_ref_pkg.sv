// div_ref_pkg -- reference model for the divider testbenches.
//
// Written independently of the RTL tables: reciprocal terms are evaluated in
// floating point and rounded to nearest (halves up), the divisor is split
// arithmetically, and residues are taken with plain integer modulo.
package div_ref_pkg;

  localparam int NCH = 5;
  localparam int MODS [NCH] = '{32, 31, 29, 23, 21};
  localparam longint MR = 13894944;
  localparam real KS_R = 159712.0;
  localparam real K_R  = 49.07;

  function automatic longint rnd(input real v);
    return longint'($floor(v + 0.5));
  endfunction

  function automatic longint ref_rom1(input int a);   // a = 64*aseg
    return (a == 0) ? 0 : rnd(KS_R / a);
  endfunction

  function automatic longint ref_rom2(input int a);
    return (a == 0) ? 0 : rnd(KS_R / (real'(a) * (real'(a) + K_R)));
  endfunction

  function automatic longint ref_rom4(input int b);
    return (b == 0) ? 0 : rnd(KS_R / b);
  endfunction

  // residue of a signed integer
  function automatic int res(input longint v, input int m);
    longint r, ml;
    ml = longint'(m);
    r  = v % ml;
    if (r < 0) r += ml;
    return int'(r);
  endfunction

  // magnitude after the converter's clamp
  function automatic int ref_mag(input int y);
    int mg;
    mg = (y < 0) ? -y : y;
    return (mg > 2047) ? 2047 : mg;
  endfunction

  // signed scaled reciprocal {Ks/Y} as the divider approximates it
  function automatic longint ref_recip(input int y);
    int mg, a, b;
    longint r;
    mg = ref_mag(y);
    a  = (mg / 64) * 64;
    b  = mg - a;
    if (a == 0) r = ref_rom4(b);
    else        r = ref_rom1(a) - b * ref_rom2(a);
    return (y < 0) ? -r : r;
  endfunction

  // p / Ks rounded to nearest, halves away from zero
  function automatic longint ref_scale(input longint p);
    longint mg;
    mg = (p < 0) ? -p : p;
    mg = (2 * mg + 159712) / (2 * 159712);
    return (p < 0) ? -mg : mg;
  endfunction

  function automatic longint ref_quot(input int x, input int y);
    return ref_scale(longint'(x) * ref_recip(y));
  endfunction

  // true when the divider's residue product stays inside the signed range
  function automatic bit in_domain(input int x, input int y);
    longint p;
    p = longint'(x) * ref_recip(y);
    if (p < 0) p = -p;
    return 2 * p < MR;
  endfunction

endpackage
