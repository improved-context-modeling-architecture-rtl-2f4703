// rlc_op_tb: exhaustive test of the run-length operator over the run flag
// and the four magnitude bits: RL symbol, uniform symbols giving the row of
// the first 1 (MSB first), and the rows whose zero-coding symbol the run
// replaces (all four with no 1, else rows 0..k).
`timescale 1ns/1ps
module rlc_op_tb;
  import cm_pkg::*;
  logic       run;
  logic [3:0] bits;
  cxd_t       rl;
  cxd_t [1:0] uni;
  logic       rl_valid, uni_valid;
  logic [1:0] k;
  logic [3:0] covered;
  int checks = 0, failures = 0;

  rlc_op dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int m = 0; m < 32; m++) begin
      int ek;
      logic [3:0] ecov;
      run = m[4]; bits = m[3:0];
      #1;
      ek = 4;
      for (int i = 0; i < 4; i++) if (bits[i] && ek == 4) ek = i;
      ecov = '0;
      if (run) for (int i = 0; i < 4; i++) if (i <= ek) ecov[i] = 1;
      check(rl_valid == run, $sformatf("rl_valid m=%0h", m));
      check(rl.cx == 5'd17 && rl.d == (bits != 0), $sformatf("rl m=%0h", m));
      check(uni_valid == (run && bits != 0), $sformatf("uni_valid m=%0h", m));
      if (ek < 4) begin
        check(uni[0].cx == 5'd18 && uni[1].cx == 5'd18, $sformatf("uni cx m=%0h", m));
        check({uni[0].d, uni[1].d} == 2'(ek), $sformatf("uni bits m=%0h", m));
        check(int'(k) == ek, $sformatf("k m=%0h", m));
      end
      check(covered == ecov, $sformatf("covered m=%0h: %b expected %b", m, covered, ecov));
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
