// rns_scaler_tb -- feeds residue vectors of random signed products P with
// |P| < M/2 (plus the edges of the range and exact rounding ties) into the
// scaler, one per clock, and checks that three cycles later it returns the
// residues of P / Ks rounded to nearest, halves away from zero.
module rns_scaler_tb;
  import rns_div_pkg::*;
  import div_ref_pkg::*;

  localparam int LAT = 3;
  localparam int N   = 4000;

  logic         clk = 0;
  residue_vec_t pin, q;
  int checks = 0, failures = 0;
  longint ps [N];

  always #5 clk = ~clk;

  rns_scaler dut (.clk(clk), .p(pin), .q(q));

  initial begin
    #((N + 100) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      case (k)
        0: ps[k] = 0;
        1: ps[k] = MR / 2 - 1;
        2: ps[k] = -(MR / 2);
        3: ps[k] = 79856;          // exactly Ks/2: rounds away from zero
        4: ps[k] = -79856;
        5: ps[k] = 79855;
        default: ps[k] = longint'($urandom_range(32'd13894943)) - MR / 2;
      endcase
    end
    for (int k = 0; k < N + LAT; k++) begin
      @(negedge clk);
      if (k >= LAT) begin
        longint qq;
        qq = ref_scale(ps[k - LAT]);
        for (int i = 0; i < NCH; i++) begin
          checks++;
          if (int'(q[i]) != res(qq, MODS[i])) begin
            failures++;
            if (failures < 10) $display("FAIL p=%0d m=%0d got=%0d exp=%0d", ps[k-LAT], MODS[i], q[i], res(qq, MODS[i]));
          end
        end
      end
      if (k < N)
        for (int i = 0; i < NCH; i++) pin[i] = 5'(res(ps[k], MODS[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
