// example1_mult_tb -- signed multiplication in residue arithmetic with the
// modulo-m multiplier, in the six-modulus base {32, 31, 29, 27, 25, 23}
// (M = 446 623 200).
//
// The worked case 35 * (-70) must give the residues (14, 30, 15, 7, 0, 11) of
// M - 2450.  Random signed products with |z1 * z2| < M/2 are then checked
// against the residues of the integer product, and a few are decoded back
// to the signed integer to show that the sign survives.
module example1_mult_tb;
  localparam int NM = 6;
  localparam int MODS [NM] = '{32, 31, 29, 27, 25, 23};
  localparam longint MB = 446623200;
  localparam int WORKED [NM] = '{14, 30, 15, 7, 0, 11};   // residues of 35 * (-70)

  logic [NM-1:0][4:0] a, b, p;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NM; i++) begin : g
    mod_mult #(.MOD(MODS[i])) dut (.x(a[i]), .y(b[i]), .p(p[i]));
  end

  function automatic int res(input longint v, input int m);
    longint r, ml;
    ml = longint'(m);
    r  = v % ml;
    if (r < 0) r += ml;
    return int'(r);
  endfunction

  task automatic apply(input longint z1, input longint z2);
    for (int i = 0; i < NM; i++) begin
      a[i] = 5'(res(z1, MODS[i]));
      b[i] = 5'(res(z2, MODS[i]));
    end
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin

    apply(35, -70);
    for (int i = 0; i < NM; i++) begin
      checks++;
      if (int'(p[i]) != WORKED[i]) begin
        failures++;
        $display("FAIL worked case m=%0d got=%0d expected %0d", MODS[i], p[i], WORKED[i]);
      end
    end
    for (int k = 0; k < 2000; k++) begin
      longint z1, z2, pr;
      z1 = longint'($urandom_range(20000)) - 10000;
      z2 = longint'($urandom_range(40000)) - 20000;
      pr = z1 * z2;
      if (2 * (pr < 0 ? -pr : pr) >= MB) continue;
      apply(z1, z2);
      for (int i = 0; i < NM; i++) begin
        checks++;
        if (int'(p[i]) != res(pr, MODS[i])) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d m=%0d got=%0d", z1, z2, MODS[i], p[i]);
        end
      end
    end
    // decode small products back to signed integers
    for (int k = 0; k < 50; k++) begin
      longint z1, z2, dec;
      z1 = longint'($urandom_range(200)) - 100;
      z2 = longint'($urandom_range(200)) - 100;
      apply(z1, z2);
      dec = 1;                         // not a product of two values in range
      for (longint v = -10000; v <= 10000; v++) begin
        bit m;
        m = 1;
        for (int i = 0; i < NM; i++) if (int'(p[i]) != res(v, MODS[i])) m = 0;
        if (m) begin dec = v; break; end
      end
      checks++;
      if (dec != z1 * z2) begin
        failures++;
        $display("FAIL decode %0d*%0d gave %0d", z1, z2, dec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
