// sign_mag_gen_tb: exhaustive test of the sign/magnitude generator at 16
// bits, including the most negative value, against integer arithmetic.
`timescale 1ns/1ps
module sign_mag_gen_tb;
  logic [15:0] coef, mag;
  logic        sign;
  int checks = 0, failures = 0;

  sign_mag_gen #(.DATA_W(16)) dut (.coef(coef), .sign(sign), .mag(mag));

  initial begin
    for (int v = -32768; v < 32768; v++) begin
      coef = 16'(v);
      #1;
      checks++;
      if (sign != (v < 0) || int'(mag) != ((v < 0) ? -v : v)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: sign %0d mag %0d", v, sign, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
