// rns_divider -- pipelined divider of signed numbers in residue arithmetic.
//
// Computes Q ~ X / Y for a dividend X in [-2048, 2047], given as residues in
// the base {32, 31, 29, 23, 21}, and a divisor Y given as a 12-bit two's
// complement word.  The quotient leaves as residues in the same base.
// The reciprocal of Y is approximated from two table look-ups on the upper
// (a) and lower (b) segments of |Y|, {Ks/Y} ~ {Ks/a} - b*{Ks/(a(a+K))},
// multiplied by X channel by channel and finally scaled down by Ks = 159712.
// For |Y| < 64 (a = 0) the reciprocal {Ks/b} is looked up directly.
//
// Pipeline, one division accepted per clock, LATENCY = 8 cycles:
//   1     scaling converter (sign / a / b) and ROM5, registered
//   2..5  five residue channels (ROM1-4, MULT1, BA, MUX + MULT2)
//   6..8  scaler (CRT reconstruction, divide by Ks, back to residues)
// in_valid travels beside the data and becomes out_valid; there is no stall.
// Valid results: for |Y| >= 64 every X is in range; for |Y| < 64 the product
// |X|*{Ks/|Y|} must stay below M/2 = 6 947 472 (|X/Y| up to about 43),
// otherwise the residue product wraps and the quotient is wrong.  Y = 0 is
// not detected and gives 0.  The maximum quotient error measured over the
// valid domain with |Y| >= 64 is below 2.5.
module rns_divider
  import rns_div_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,     // synchronous, active low; clears the valid pipe
  input  logic                 in_valid,
  input  logic signed [YW-1:0] y,         // divisor, two's complement
  input  residue_vec_t         x,         // dividend residues, x[i] = |X|_{MODULI[i]}
  output logic                 out_valid,
  output residue_vec_t         q          // quotient residues
);
  localparam int LATENCY = 8;

  // stage 1: scaling converter and ROM5
  divisor_sm_t  d_c, d_q;
  logic         az_c, az_q;
  residue_vec_t x_q;

  scaling_converter u_conv (.y(y), .d(d_c));
  rom5_sign         u_rom5 (.aseg(d_c.aseg), .a_zero(az_c));

  always_ff @(posedge clk) begin
    d_q  <= d_c;
    az_q <= az_c;
    x_q  <= x;
  end

  // stages 2..5: residue channels
  residue_vec_t p;
  for (genvar i = 0; i < NCH; i++) begin : g_ch
    rns_channel #(.MOD(MODULI[i])) u_ch (
      .clk(clk), .d(d_q), .a_zero(az_q), .x(x_q[i]), .p(p[i])
    );
  end

  // stages 6..8: scaling by Ks
  rns_scaler u_scaler (.clk(clk), .p(p), .q(q));

  // valid pipe
  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end
  assign out_valid = vpipe[LATENCY-1];
endmodule
