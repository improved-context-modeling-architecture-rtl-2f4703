// zc_op_tb: exhaustive test of the zero-coding operator. Every combination
// of the eight neighbour significance bits in each of the four subbands is
// compared with the JPEG2000 zero-coding table of cm_ref_pkg.
`timescale 1ns/1ps
module zc_op_tb;
  import cm_pkg::*;
  import cm_ref_pkg::*;
  band_e      band;
  nbr_t       nb;
  logic [4:0] cx;
  int checks = 0, failures = 0;

  zc_op dut (.band(band), .nb(nb), .cx(cx));

  initial begin
    for (int b = 0; b < 4; b++)
      for (int m = 0; m < 256; m++) begin
        int h, v, d;
        band = band_e'(b);
        nb = '0;
        nb.h_sig = m[1:0];
        nb.v_sig = m[3:2];
        nb.d_sig = m[7:4];
        nb.h_sgn = 2'($urandom);
        nb.v_sgn = 2'($urandom);
        #1;
        h = $countones(m[1:0]); v = $countones(m[3:2]); d = $countones(m[7:4]);
        checks++;
        if (int'(cx) != ref_zc(b, h, v, d)) begin
          failures++;
          $display("FAIL band %0d h%0d v%0d d%0d: cx %0d expected %0d", b, h, v, d, cx, ref_zc(b, h, v, d));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
