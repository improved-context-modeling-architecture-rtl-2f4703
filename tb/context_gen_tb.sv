// context_gen_tb: drives the context generation module the way the control
// unit and the code-block memory do (a column tag per enabled cycle, sample
// data one enabled cycle later) for three 16 x 8 code blocks back to back,
// with random stalls, and compares every pass output column with the
// sequential reference model: which rows each pass codes (pass flags), run
// mode of cleanup columns, magnitude bits, and for every coded sample the
// number of significant horizontal, vertical and diagonal neighbours that
// pass sees. Also checks the column latency of each pass (SPP 1, MRP 3,
// CUP 5 enabled cycles after the column enters the window).
`timescale 1ns/1ps
module context_gen_tb;
  import cm_pkg::*;
  import cm_ref_pkg::*;
  localparam int CW = 16, CH = 8, MW = 16, NB = 3, NS = CH / 4;
  logic clk = 0, rst_n = 0, en = 0;
  col_tag_t iss_tag = '0;
  logic [4:0] iss_addr = '0;
  logic [3:0] iss_col = '0;
  logic [3:0] rd_sign;
  logic [3:0][MW-1:0] rd_mag;
  pass_info_t spp_o, mrp_o, cup_o;
  int iss_blk = 0;
  int mag [NB][CH][CW];
  int sgn [NB][CH][CW];
  cm_ref models [NB];
  int checks = 0, failures = 0, n_run = 0, n_stall = 0;
  int issued = 0, lat_ok = 1;
  int col_blk [$];
  int col_idx [$];
  int seen [3] = '{0, 0, 0};
  int n_issue_at_out [3][$];

  context_gen #(.CB_W(CW), .CB_H(CH), .MAG_W(MW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // code-block memory model: synchronous read with enable
  always @(posedge clk) if (en) begin
    for (int r = 0; r < 4; r++) begin
      int y, x;
      y = (int'(iss_addr) / CW) * 4 + r;
      x = int'(iss_addr) % CW;
      rd_mag[r]  <= MW'(mag[iss_blk][y][x]);
      rd_sign[r] <= 1'(sgn[iss_blk][y][x]);
    end
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      models[b] = new(CW, CH);
      models[b].band = (b + 1) % 4;
      for (int y = 0; y < CH; y++)
        for (int x = 0; x < CW; x++) begin
          mag[b][y][x] = ($urandom % 4 == 0) ? int'($urandom % 256) : 0;
          sgn[b][y][x] = $urandom % 2;
          models[b].mag[y][x] = mag[b][y][x];
          models[b].sgn[y][x] = sgn[b][y][x];
        end
      models[b].run();
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++)
      for (int bp = models[b].nbp - 1; bp >= 0; bp--)
        for (int s = 0; s < NS; s++)
          for (int c = 0; c < CW; c++) begin
            @(negedge clk);
            while ($urandom % 5 == 0) begin en = 0; n_stall++; @(negedge clk); end
            en = 1;
            iss_blk = b;
            iss_tag = '{valid: 1'b1, first: c == 0, last: c == CW - 1, top: s == 0,
                        first_bp: bp == models[b].nbp - 1, bp: 5'(bp),
                        pass_end: s == NS - 1 && c == CW - 1,
                        cb_end: s == NS - 1 && c == CW - 1 && bp == 0, band: band_e'(models[b].band)};
            iss_addr = 5'(s * CW + c);
            iss_col = 4'(c);
            col_blk.push_back(b);
            col_idx.push_back(models[b].key(bp, s * 4, c));
          end
    @(negedge clk);
    iss_tag = '0;
    repeat (20) @(negedge clk);
    for (int p = 0; p < 3; p++)
      check(seen[p] == col_blk.size(), $sformatf("pass %0d: %0d columns out, %0d issued", p, seen[p], col_blk.size()));
    check(n_run > 0, "no run-mode column");
    check(n_stall > 0, "no stall");
    check(lat_ok == 1, "pass latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count enabled issues, to measure each pass's latency in enabled cycles
  always @(negedge clk) if (rst_n && en && iss_tag.valid) issued++;

  task automatic check_pass(int p, pass_info_t o);
    int b, k;
    bit [3:0] cm;
    if (seen[p] >= col_blk.size()) begin check(0, "extra output column"); return; end
    b = col_blk[seen[p]];
    k = col_idx[seen[p]];
    cm = models[b].cmask[p].exists(k) ? models[b].cmask[p][k] : 4'h0;
    for (int r = 0; r < 4; r++) begin
      check(o.rows[r].coded == cm[r], $sformatf("pass %0d blk %0d col %0d row %0d: flag %0d expected %0d",
                                                p, b, k, r, o.rows[r].coded, cm[r]));
      if (models[b].nbc[p].exists(k * 4 + r)) begin
        int h, v, d;
        h = $countones(o.rows[r].nb.h_sig); v = $countones(o.rows[r].nb.v_sig);
        d = $countones(o.rows[r].nb.d_sig);
        if (p == 1)
          check(((h + v + d) > 0) == (models[b].nbc[p][k * 4 + r] > 0), $sformatf("MRP neighbours blk %0d col %0d row %0d", b, k, r));
        else
          check(h * 100 + v * 10 + d == models[b].nbc[p][k * 4 + r],
                $sformatf("pass %0d blk %0d col %0d row %0d: neighbours %0d expected %0d", p, b, k, r,
                          h * 100 + v * 10 + d, models[b].nbc[p][k * 4 + r]));
      end
    end
    if (p == 2) begin
      check(o.run == models[b].runf[k], $sformatf("run flag blk %0d col %0d", b, k));
      if (o.run) n_run++;
    end
    // latency: the column left the issue stage 2 + position enabled cycles ago
    if (issued - seen[p] != ((p == 0) ? 3 : (p == 1) ? 5 : 7) && issued < int'(col_blk.size())) lat_ok = 0;
    seen[p]++;
  endtask

  always @(negedge clk) if (rst_n && en) begin
    if (spp_o.valid) check_pass(0, spp_o);
    if (mrp_o.valid) check_pass(1, mrp_o);
    if (cup_o.valid) check_pass(2, cup_o);
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
