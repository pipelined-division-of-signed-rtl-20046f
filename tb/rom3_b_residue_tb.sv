// rom3_b_residue_tb -- exhaustive check of rom3_b_residue for all five moduli of the base
// (the sign input is unused by this table, so the
// expected residue is that of b itself).
module rom3_b_residue_tb;
  import rns_div_pkg::*;
  import div_ref_pkg::*;

  logic              neg;
  logic [5:0]        idx;
  logic [NCH-1:0][4:0] r;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NCH; i++) begin : g
    rom3_b_residue #(.MOD(MODULI[i])) dut (.b(idx), .r(r[i]));
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
          v = longint'((neg ? -1 : 1) * k);
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
