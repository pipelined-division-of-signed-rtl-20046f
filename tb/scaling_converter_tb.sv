// scaling_converter_tb -- drives every 12-bit divisor through the scaling
// converter and checks sign, a segment and b segment against an arithmetic
// split of |Y| (with -2048 clamped to magnitude 2047).
module scaling_converter_tb;
  import rns_div_pkg::*;
  import div_ref_pkg::*;

  logic signed [11:0] y;
  divisor_sm_t        d;
  int checks = 0, failures = 0;

  scaling_converter dut (.y(y), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -2048; v < 2048; v++) begin
      int mg;
      y  = 12'(v);
      #1;
      mg = ref_mag(v);
      checks++;
      if (d.neg !== (v < 0) || int'(d.aseg) != mg / 64 || int'(d.b) != mg % 64) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d neg=%0d aseg=%0d b=%0d", v, d.neg, d.aseg, d.b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
