// rns_scaler -- divides the residue product X*{Ks/Y} by Ks with rounding and
// returns the quotient in the same residue base.
//
// The divider only specifies that the residues are scaled by Ks in the last
// stage; the method here is this implementation's own and is the simplest
// exact one:
//   stage 1  Chinese-remainder reconstruction.  Each channel looks up
//            |x_i * w_i|_M (w_i = M_i*|M_i^-1|_{m_i}, 32-entry tables built at
//            elaboration); the five terms are added and reduced modulo M by
//            comparing the sum with M..4M.
//   stage 2  the value N in [0, M) is read as signed (N >= M/2 means N - M),
//            its magnitude is divided by Ks, rounding to nearest with halves
//            away from zero.  |Q| <= 43 fits in 6 bits.
//   stage 3  the signed quotient is converted back to residues.
// Latency 3 cycles, one new operand per cycle.  The result is exact as long
// as |X*{Ks/Y}| < M/2; a larger product wraps around modulo M and the
// quotient is then wrong (there is no overflow detection).
module rns_scaler
  import rns_div_pkg::*;
(
  input  logic         clk,
  input  residue_vec_t p,     // |X*{Ks/Y}|_{m_i}
  output residue_vec_t q      // |Q|_{m_i}
);
  localparam int NW = 27;                 // holds 5*M
  localparam int QW = 6;                  // |Q| <= M/(2*Ks) < 44

  typedef logic [NW-1:0] crt_term_t;
  typedef crt_term_t crt_table_t [NCH*32];   // entry 32*i + r

  function automatic crt_table_t build();
    crt_table_t t;
    for (int i = 0; i < NCH; i++)
      for (int r = 0; r < 32; r++)
        t[32*i + r] = crt_term_t'((longint'(r) % longint'(MODULI[i]) * crt_weight(MODULI[i])) % M_RANGE);
    return t;
  endfunction

  localparam crt_table_t CRT = build();

  // stage 1: reconstruct N = |P|_M
  logic [NW-1:0] sum_c, n_c, n_q;
  always_comb begin
    sum_c = '0;
    for (int i = 0; i < NCH; i++) sum_c += CRT[32*i + int'(p[i])];
    n_c = sum_c;
    for (int k = NCH - 1; k >= 1; k--)
      if (sum_c >= NW'(k * M_RANGE)) begin
        n_c = sum_c - NW'(k * M_RANGE);
        break;
      end
  end
  always_ff @(posedge clk) n_q <= n_c;

  // stage 2: signed value, divide by Ks with rounding
  logic          neg_c, neg_q;
  logic [NW-1:0] mag_c;
  logic [QW-1:0] qmag_c, qmag_q;
  always_comb begin
    neg_c  = n_q >= NW'(M_RANGE / 2);
    mag_c  = neg_c ? NW'(M_RANGE) - n_q : n_q;
    qmag_c = QW'((mag_c + NW'(KS / 2)) / NW'(KS));
    if (qmag_c == '0) neg_c = 1'b0;
  end
  always_ff @(posedge clk) begin
    neg_q  <= neg_c;
    qmag_q <= qmag_c;
  end

  // stage 3: forward conversion of the signed quotient
  residue_vec_t q_c;
  always_comb begin
    for (int i = 0; i < NCH; i++) begin
      logic [QW-1:0] r;
      r = qmag_q % QW'(MODULI[i]);
      if (neg_q && r != '0) r = QW'(MODULI[i]) - r;
      q_c[i] = residue_t'(r);
    end
  end
  always_ff @(posedge clk) q <= q_c;
endmodule
