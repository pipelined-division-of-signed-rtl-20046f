// rom2_recip_aak_tb -- exhaustive check of rom2_recip_aak for all five moduli of the base
// against the floating-point reference of the table entry.
module rom2_recip_aak_tb;
  import rns_div_pkg::*;
  import div_ref_pkg::*;

  logic              neg;
  logic [5:0]        idx;
  logic [NCH-1:0][4:0] r;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NCH; i++) begin : g
    rom2_recip_aak #(.MOD(MODULI[i])) dut (.neg(neg), .aseg(idx[4:0]), .r(r[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 64; k++) begin
        neg = s[0];
        idx = 6'(k);
        #1;
        for (int i = 0; i < NCH; i++) begin
          longint v;
          int exp_r;
          v = ref_rom2(64 * (k % 32));
          exp_r = res(neg ? -v : v, MODS[i]);
          checks++;
          if (int'(r[i]) != exp_r) begin
            failures++;
            if (failures < 10) $display("FAIL neg=%0d idx=%0d mod=%0d got=%0d exp=%0d", neg, k, MODS[i], r[i], exp_r);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
