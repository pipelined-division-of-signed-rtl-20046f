// mod_sub_tb -- exhaustive check of the modulo-m subtractor for all five
// moduli of the base: every pair of residues x, y in [0, m).
module mod_sub_tb;
  import rns_div_pkg::*;
  import div_ref_pkg::*;

  logic [4:0]          a, b;
  logic [NCH-1:0][4:0] r;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NCH; i++) begin : g
    mod_sub #(.MOD(MODULI[i])) dut (.x(a), .y(b), .d(r[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ai = 0; ai < 32; ai++)
      for (int bi = 0; bi < 32; bi++) begin
        a = 5'(ai);
        b = 5'(bi);
        #1;
        for (int i = 0; i < NCH; i++) begin
          int exp_r;
          if (ai >= MODS[i] || bi >= MODS[i]) continue;
          exp_r = res(longint'(ai) - longint'(bi), MODS[i]);
          checks++;
          if (int'(r[i]) != exp_r) begin
            failures++;
            if (failures < 10) $display("FAIL m=%0d x=%0d y=%0d got=%0d exp=%0d", MODS[i], ai, bi, r[i], exp_r);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
