// mr_op_tb: exhaustive test of the magnitude-refinement operator: every
// neighbourhood, refinement state and magnitude bit against the contexts
// 14 (first refinement, no significant neighbour), 15 (first refinement,
// some neighbour significant) and 16 (later refinement).
`timescale 1ns/1ps
module mr_op_tb;
  import cm_pkg::*;
  nbr_t       nb;
  logic       refined, bit_v, d;
  logic [4:0] cx;
  int checks = 0, failures = 0;

  mr_op dut (.refined(refined), .nb(nb), .bit_v(bit_v), .cx(cx), .d(d));

  initial begin
    for (int m = 0; m < 1024; m++) begin
      int e;
      nb = '0;
      nb.h_sig = m[1:0]; nb.v_sig = m[3:2]; nb.d_sig = m[7:4];
      nb.h_sgn = 2'($urandom); nb.v_sgn = 2'($urandom);
      refined = m[8];
      bit_v = m[9];
      #1;
      e = m[8] ? 16 : (m[7:0] != 0) ? 15 : 14;
      checks++;
      if (int'(cx) != e || d != bit_v) begin
        failures++;
        $display("FAIL m=%0h: cx %0d expected %0d", m, cx, e);
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
