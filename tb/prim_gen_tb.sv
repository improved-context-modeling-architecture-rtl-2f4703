// prim_gen_tb: random and directed test of the primitive operator
// generation module. Random pass information is applied for the three
// passes (with random stalls); the expected CX-D lane groups are built
// independently from the JPEG2000 tables in cm_ref_pkg and the coding order
// of each pass, and compared one enabled cycle later: pair count, every
// packed lane and the group tags. A directed column pattern produces the
// worst case of 8 + 4 + 10 = 22 pairs in one cycle.
`timescale 1ns/1ps
module prim_gen_tb;
  import cm_pkg::*;
  import cm_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  pass_info_t spp_i = '0, mrp_i = '0, cup_i = '0;
  grp_tag_t spp_tag, mrp_tag, cup_tag;
  logic [3:0] spp_n, mrp_n, cup_n;
  cxd_t [SPP_LANES-1:0] spp_cxd;
  cxd_t [MRP_LANES-1:0] mrp_cxd;
  cxd_t [CUP_LANES-1:0] cup_cxd;
  int checks = 0, failures = 0, max_total = 0, n_run_int = 0, n_stall = 0;

  prim_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  function automatic int cl(int a);
    return (a > 0) ? 1 : (a < 0) ? -1 : 0;
  endfunction

  function automatic void zc_pair(pass_info_t pi, int r, ref int q[$]);
    nbr_t n;
    n = pi.rows[r].nb;
    q.push_back(ref_zc(int'(pi.band), $countones(n.h_sig), $countones(n.v_sig), $countones(n.d_sig)) * 2
                + int'(pi.rows[r].bit_v));
  endfunction

  function automatic void sc_pair(pass_info_t pi, int r, ref int q[$]);
    nbr_t n;
    int hs, vs, xr, cx;
    n = pi.rows[r].nb;
    hs = (n.h_sig[0] ? (n.h_sgn[0] ? -1 : 1) : 0) + (n.h_sig[1] ? (n.h_sgn[1] ? -1 : 1) : 0);
    vs = (n.v_sig[0] ? (n.v_sgn[0] ? -1 : 1) : 0) + (n.v_sig[1] ? (n.v_sgn[1] ? -1 : 1) : 0);
    cx = ref_sc(cl(hs), cl(vs), xr);
    q.push_back(cx * 2 + (int'(pi.rows[r].sign) ^ xr));
  endfunction

  // expected pairs of one pass, encoded as cx * 2 + d
  function automatic void expect_pass(int p, pass_info_t pi, ref int q[$]);
    q.delete();
    if (!pi.valid) return;
    if (p == 1) begin
      for (int r = 0; r < 4; r++) if (pi.rows[r].coded) begin
        nbr_t n;
        n = pi.rows[r].nb;
        q.push_back((pi.rows[r].refined ? 16 : (|{n.h_sig, n.v_sig, n.d_sig}) ? 15 : 14) * 2 + int'(pi.rows[r].bit_v));
      end
      return;
    end
    if (p == 2 && pi.run) begin
      int k;
      k = -1;
      for (int r = 3; r >= 0; r--) if (pi.rows[r].bit_v) k = r;
      q.push_back(17 * 2 + (k >= 0));
      if (k < 0) return;
      q.push_back(18 * 2 + k / 2);
      q.push_back(18 * 2 + k % 2);
      sc_pair(pi, k, q);
      for (int r = k + 1; r < 4; r++) begin
        zc_pair(pi, r, q);
        if (pi.rows[r].bit_v) sc_pair(pi, r, q);
      end
      return;
    end
    for (int r = 0; r < 4; r++) if (pi.rows[r].coded) begin
      zc_pair(pi, r, q);
      if (pi.rows[r].bit_v) sc_pair(pi, r, q);
    end
  endfunction

  function automatic pass_info_t rand_info(int p);
    pass_info_t pi;
    pi = pass_info_t'({$urandom, $urandom, $urandom});
    pi.valid = ($urandom % 8) != 0;
    pi.run = 0;
    if (p == 2 && ($urandom % 3 == 0)) begin
      pi.run = 1;
      for (int r = 0; r < 4; r++) begin
        pi.rows[r].coded = 1;
        pi.rows[r].bit_v = ($urandom % 5 == 0);
      end
    end
    return pi;
  endfunction

  initial begin
    int q [3][$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      if (it == 5) begin
        // worst case: 22 pairs
        spp_i = rand_info(0); mrp_i = rand_info(1); cup_i = rand_info(2);
        spp_i.valid = 1; mrp_i.valid = 1; cup_i.valid = 1; cup_i.run = 1;
        for (int r = 0; r < 4; r++) begin
          spp_i.rows[r].coded = 1; spp_i.rows[r].bit_v = 1;
          mrp_i.rows[r].coded = 1;
          cup_i.rows[r].coded = 1; cup_i.rows[r].bit_v = 1;
        end
      end else begin
        spp_i = rand_info(0); mrp_i = rand_info(1); cup_i = rand_info(2);
      end
      en = (it == 5) || (($urandom % 6) != 0);
      if (!en) n_stall++;
      expect_pass(0, spp_i, q[0]);
      expect_pass(1, mrp_i, q[1]);
      expect_pass(2, cup_i, q[2]);
      if (en) begin
        int total;
        @(negedge clk);
        check(spp_tag.valid == spp_i.valid && spp_tag.bp == spp_i.bp && spp_tag.pass_end == spp_i.pass_end
              && spp_tag.cb_end == spp_i.cb_end && mrp_tag.valid == mrp_i.valid && cup_tag.valid == cup_i.valid,
              "group tags");
        check(int'(spp_n) == q[0].size(), $sformatf("SPP count %0d expected %0d", spp_n, q[0].size()));
        check(int'(mrp_n) == q[1].size(), $sformatf("MRP count %0d expected %0d", mrp_n, q[1].size()));
        check(int'(cup_n) == q[2].size(), $sformatf("CUP count %0d expected %0d", cup_n, q[2].size()));
        foreach (q[0][i]) if (i < 8)  check(int'(spp_cxd[i]) == q[0][i], $sformatf("SPP lane %0d", i));
        foreach (q[1][i]) if (i < 4)  check(int'(mrp_cxd[i]) == q[1][i], $sformatf("MRP lane %0d", i));
        foreach (q[2][i]) if (i < 10) check(int'(cup_cxd[i]) == q[2][i], $sformatf("CUP lane %0d", i));
        total = int'(spp_n) + int'(mrp_n) + int'(cup_n);
        if (total > max_total) max_total = total;
        if (cup_i.valid && cup_i.run && q[2].size() > 1) n_run_int++;
      end
    end
    check(max_total == 22, $sformatf("largest cycle had %0d pairs, expected 22", max_total));
    check(n_run_int > 0 && n_stall > 0, "run interrupt / stall not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
