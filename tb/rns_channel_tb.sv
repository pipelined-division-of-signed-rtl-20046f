// rns_channel_tb -- drives all five channels with random signed divisors and
// dividends, one per clock, and checks each channel's output residue
// |X * {Ks/Y}|_m four cycles later against the reference reciprocal.  Also
// counts divisors on the a = 0 (ROM4) path and on the two-term path.
module rns_channel_tb;
  import rns_div_pkg::*;
  import div_ref_pkg::*;

  localparam int LAT = 4;
  localparam int N   = 3000;

  logic                clk = 0;
  divisor_sm_t         d;
  logic                a_zero;
  logic [NCH-1:0][4:0] x, p;
  int checks = 0, failures = 0, n_azero = 0, n_twoterm = 0;
  int xs [N], ys [N];

  always #5 clk = ~clk;

  for (genvar i = 0; i < NCH; i++) begin : g
    rns_channel #(.MOD(MODULI[i])) dut (.clk(clk), .d(d), .a_zero(a_zero), .x(x[i]), .p(p[i]));
  end

  initial begin
    #((N + 100) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      xs[k] = int'($urandom_range(4095)) - 2048;
      ys[k] = (k % 4 == 0) ? int'($urandom_range(126)) - 63 : int'($urandom_range(4095)) - 2048;
    end
    for (int k = 0; k < N + LAT; k++) begin
      @(negedge clk);
      if (k >= LAT) begin
        longint pr;
        pr = longint'(xs[k - LAT]) * ref_recip(ys[k - LAT]);
        for (int i = 0; i < NCH; i++) begin
          checks++;
          if (int'(p[i]) != res(pr, MODS[i])) begin
            failures++;
            if (failures < 10) $display("FAIL x=%0d y=%0d m=%0d got=%0d exp=%0d", xs[k-LAT], ys[k-LAT], MODS[i], p[i], res(pr, MODS[i]));
          end
        end
      end
      if (k < N) begin
        int mg;
        mg       = ref_mag(ys[k]);
        d.neg    = ys[k] < 0;
        d.aseg   = 5'(mg / 64);
        d.b      = 6'(mg % 64);
        a_zero   = (mg / 64) == 0;
        if (a_zero) n_azero++; else n_twoterm++;
        for (int i = 0; i < NCH; i++) x[i] = 5'(res(xs[k], MODS[i]));
      end
    end
    checks++;
    if (n_azero == 0 || n_twoterm == 0) failures++;
    $display("a=0 path %0d, two-term path %0d", n_azero, n_twoterm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
