// sc_op_tb: exhaustive test of the sign-coding operator. All combinations of
// horizontal/vertical neighbour significance and signs and of the sample's
// own sign are compared with the JPEG2000 sign-coding table of cm_ref_pkg.
`timescale 1ns/1ps
module sc_op_tb;
  import cm_pkg::*;
  import cm_ref_pkg::*;
  nbr_t       nb;
  logic       sign, d;
  logic [4:0] cx;
  int checks = 0, failures = 0;

  sc_op dut (.nb(nb), .sign(sign), .cx(cx), .d(d));

  function automatic int cl(int a);
    return (a > 0) ? 1 : (a < 0) ? -1 : 0;
  endfunction

  initial begin
    for (int m = 0; m < 512; m++) begin
      int hs, vs, xr, ecx;
      nb = '0;
      nb.h_sig = m[1:0]; nb.h_sgn = m[3:2];
      nb.v_sig = m[5:4]; nb.v_sgn = m[7:6];
      nb.d_sig = 4'($urandom);
      sign = m[8];
      #1;
      hs = (m[0] ? (m[2] ? -1 : 1) : 0) + (m[1] ? (m[3] ? -1 : 1) : 0);
      vs = (m[4] ? (m[6] ? -1 : 1) : 0) + (m[5] ? (m[7] ? -1 : 1) : 0);
      ecx = ref_sc(cl(hs), cl(vs), xr);
      checks++;
      if (int'(cx) != ecx || int'(d) != (int'(sign) ^ xr)) begin
        failures++;
        $display("FAIL m=%0h: cx %0d d %0d expected %0d %0d", m, cx, d, ecx, int'(sign) ^ xr);
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
