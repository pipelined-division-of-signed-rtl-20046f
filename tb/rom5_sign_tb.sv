// rom5_sign_tb -- checks the a = 0 select for every value of the a segment.
module rom5_sign_tb;
  logic [4:0] aseg;
  logic       a_zero;
  int checks = 0, failures = 0;

  rom5_sign dut (.aseg(aseg), .a_zero(a_zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      aseg = 5'(k);
      #1;
      checks++;
      if (a_zero !== (k == 0)) begin
        failures++;
        $display("FAIL aseg=%0d a_zero=%0d", k, a_zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
