// cm_top_tb: end-to-end test of the pass-pipelined context modeler at its
// default size (64 x 64 code blocks, 16-bit coefficients).
//
// Streams several code blocks of different character (sparse, all zero,
// dense full-range, mid-range, structured, and one built so that all three
// passes emit their largest groups in the same cycle, 22 pairs) into the design with random input gaps and
// random output back-pressure, collects the CX-D pairs of the three lane
// groups and compares each pass's stream with the sequential reference model
// of cm_ref_pkg. Also checks the coding rate (one stripe column per cycle:
// bit-planes * 64 * 64 / 4 busy cycles per block), the number of end-of-pass
// marks, and that every mechanism happened: run mode, run interrupt, SPP and
// CUP significance, first and later refinement, output stall, loading during
// coding, input back-pressure, skipped all-zero block, a 22-pair cycle.
`timescale 1ns/1ps
module cm_top_tb;
  import cm_pkg::*;
  import cm_ref_pkg::*;

  localparam int DATA_W = 16;
  localparam int CB_W   = 64;
  localparam int CB_H   = 64;
  localparam int NBLK   = 6;

  logic                 clk = 0, rst_n = 0;
  logic                 in_valid = 0, in_ready, out_ready = 0;
  logic [DATA_W-1:0]    in_data = '0;
  band_e                in_band = BAND_LL;
  grp_tag_t             spp_tag, mrp_tag, cup_tag;
  logic [3:0]           spp_n, mrp_n, cup_n;
  cxd_t [SPP_LANES-1:0] spp_cxd;
  cxd_t [MRP_LANES-1:0] mrp_cxd;
  cxd_t [CUP_LANES-1:0] cup_cxd;
  logic                 busy;

  cm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  ref_pair_t exp_q [3][$];
  ref_pair_t got_q [3][$];
  int exp_busy = 0, got_busy = 0, exp_ends = 0, got_ends [3] = '{0, 0, 0};
  int n_stall = 0, n_load_overlap = 0, n_in_bp = 0, max_lanes = 0, n_zero_blk = 0;
  int n_run = 0, n_run_int = 0, n_spp_sig = 0, n_cup_sig = 0, n_mr_first = 0, n_mr_later = 0;
  bit feeding_done = 0;
  logic [DATA_W-1:0] blk_data [NBLK][CB_H][CB_W];
  band_e             blk_band [NBLK];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [DATA_W-1:0] gen(int kind, int y, int x);
    int r;
    r = int'($urandom);
    case (kind)
      0: return (($urandom % 8) == 0) ? DATA_W'(($urandom % 64) * (($urandom & 1) ? -1 : 1)) : '0;
      1: return '0;
      2: return (y == 5 && x == 7) ? 16'h8000 : DATA_W'(r);
      3: return (($urandom % 20) == 0) ? DATA_W'((r % 4096) * (($urandom & 1) ? -1 : 1)) : '0;
      4: return DATA_W'((((x + y) % 13) - 6) * ((x / 8) + 1));
      // peak: in bit-plane 0, SPP codes four new significant samples in
      // column 10, MRP refines column 8 and CUP has a run interrupted at row 0
      // of column 6, all in the same output cycle (8 + 4 + 10 pairs)
      default: begin
        if (y >= 4) return '0;
        if (x == 8) return 16'd3;
        if (x == 11 && y == 0) return 16'd2;
        if (x == 10 || x == 6) return 16'd1;
        return '0;
      end
    endcase
  endfunction

  // reference streams
  initial begin
    cm_ref m;
    for (int b = 0; b < NBLK; b++) begin
      blk_band[b] = band_e'(b % 4);
      m = new(CB_W, CB_H);
      m.band = int'(blk_band[b]);
      for (int y = 0; y < CB_H; y++)
        for (int x = 0; x < CB_W; x++) begin
          blk_data[b][y][x] = gen(b, y, x);
          m.sgn[y][x] = blk_data[b][y][x][DATA_W-1];
          m.mag[y][x] = m.sgn[y][x] ? 65536 - int'(blk_data[b][y][x])
                                    : int'(blk_data[b][y][x]);
        end
      m.run();
      for (int p = 0; p < 3; p++) foreach (m.q[p][i]) exp_q[p].push_back(m.q[p][i]);
      exp_busy += m.nbp * CB_W * CB_H / 4;
      exp_ends += m.nbp;
      if (m.nbp == 0) n_zero_blk++;
      n_run += m.n_run; n_run_int += m.n_run_int; n_spp_sig += m.n_spp_sig;
      n_cup_sig += m.n_cup_sig; n_mr_first += m.n_mr_first; n_mr_later += m.n_mr_later;
    end
  end

  // input feeder
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NBLK; b++)
      for (int y = 0; y < CB_H; y++)
        for (int x = 0; x < CB_W; x++) begin
          @(negedge clk);
          if (($urandom % 16) == 0) begin
            in_valid = 0;
            @(negedge clk);
          end
          in_valid = 1;
          in_data  = blk_data[b][y][x];
          in_band  = blk_band[b];
          while (!in_ready) @(negedge clk);
        end
    @(negedge clk);
    in_valid = 0;
    feeding_done = 1;
  end

  // output back-pressure
  always @(posedge clk) out_ready <= rst_n && (($urandom % 8) != 0);

  // collector: samples in mid-cycle what the next rising edge transfers
  always @(negedge clk) if (rst_n) begin
    int lanes;
    ref_pair_t e;
    lanes = 0;
    if (in_valid && !in_ready) n_in_bp++;
    if (in_valid && in_ready && busy) n_load_overlap++;
    if (busy && !out_ready) n_stall++;
    if (busy && out_ready) got_busy++;
    if (out_ready) begin
      if (spp_tag.valid) begin
        for (int i = 0; i < int'(spp_n); i++) begin
          e.bp = int'(spp_tag.bp); e.cx = int'(spp_cxd[i].cx); e.d = int'(spp_cxd[i].d);
          got_q[0].push_back(e);
        end
        lanes += int'(spp_n);
        if (spp_tag.pass_end) got_ends[0]++;
      end
      if (mrp_tag.valid) begin
        for (int i = 0; i < int'(mrp_n); i++) begin
          e.bp = int'(mrp_tag.bp); e.cx = int'(mrp_cxd[i].cx); e.d = int'(mrp_cxd[i].d);
          got_q[1].push_back(e);
        end
        lanes += int'(mrp_n);
        if (mrp_tag.pass_end) got_ends[1]++;
      end
      if (cup_tag.valid) begin
        for (int i = 0; i < int'(cup_n); i++) begin
          e.bp = int'(cup_tag.bp); e.cx = int'(cup_cxd[i].cx); e.d = int'(cup_cxd[i].d);
          got_q[2].push_back(e);
        end
        lanes += int'(cup_n);
        if (cup_tag.pass_end) got_ends[2]++;
      end
      if (lanes > max_lanes) max_lanes = lanes;
    end
  end

  // end of test
  initial begin
    int idle;
    idle = 0;
    wait (feeding_done);
    while (idle < 50) begin
      @(negedge clk);
      idle = (busy || spp_tag.valid || mrp_tag.valid || cup_tag.valid) ? 0 : idle + 1;
    end
    for (int p = 0; p < 3; p++) begin
      check(got_q[p].size() == exp_q[p].size(),
            $sformatf("pass %0d: %0d pairs, expected %0d", p, got_q[p].size(), exp_q[p].size()));
      for (int i = 0; i < exp_q[p].size() && i < got_q[p].size(); i++)
        check(got_q[p][i] == exp_q[p][i],
              $sformatf("pass %0d pair %0d: got bp%0d cx%0d d%0d, expected bp%0d cx%0d d%0d", p, i,
                        got_q[p][i].bp, got_q[p][i].cx, got_q[p][i].d,
                        exp_q[p][i].bp, exp_q[p][i].cx, exp_q[p][i].d));
      check(got_ends[p] == exp_ends, $sformatf("pass %0d: %0d end marks, expected %0d", p, got_ends[p], exp_ends));
    end
    check(got_busy == exp_busy, $sformatf("coding cycles %0d, expected %0d", got_busy, exp_busy));
    $display("mechanisms: run=%0d run_interrupt=%0d spp_sig=%0d cup_sig=%0d mr_first=%0d mr_later=%0d",
             n_run, n_run_int, n_spp_sig, n_cup_sig, n_mr_first, n_mr_later);
    $display("            stall=%0d load_during_coding=%0d input_backpressure=%0d zero_blocks=%0d max_pairs_per_cycle=%0d",
             n_stall, n_load_overlap, n_in_bp, n_zero_blk, max_lanes);
    $display("pairs: spp=%0d mrp=%0d cup=%0d coding cycles=%0d", exp_q[0].size(), exp_q[1].size(),
             exp_q[2].size(), got_busy);
    check(n_run > 0, "run mode never happened");
    check(n_run_int > 0, "run interrupt never happened");
    check(n_spp_sig > 0, "no sample became significant in SPP");
    check(n_cup_sig > 0, "no sample became significant in CUP outside a run");
    check(n_mr_first > 0 && n_mr_later > 0, "refinement contexts not all exercised");
    check(n_stall > 0, "output stall never happened");
    check(n_load_overlap > 16, "no loading while coding");
    check(n_in_bp > 0, "input back-pressure never happened");
    check(n_zero_blk > 0, "no all-zero block");
    check(max_lanes == 22, $sformatf("peak of %0d pairs in one cycle, expected 22", max_lanes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
