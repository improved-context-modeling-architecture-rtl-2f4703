// cm_frame_tb: frame-rate workload for the context modeler at its default
// size. A synthetic 640 x 480 grey image (smooth shading plus texture and
// noise) goes through a one-level integer Haar wavelet transform in the
// testbench; each of the four 320 x 240 subbands is cut into 64 x 64 code
// blocks (5 x 4 per subband, the last block row zero-padded from 48 to 64
// rows), 80 blocks in all. They are streamed back to back with no input
// gaps and no output back-pressure. Every CX-D pair is compared with the
// sequential reference model, and the total cycle count of the frame is
// checked against the budget for 30 frames per second at 100 MHz
// (3,333,333 cycles).
`timescale 1ns/1ps
module cm_frame_tb;
  import cm_pkg::*;
  import cm_ref_pkg::*;

  localparam int DATA_W = 16;
  localparam int CB     = 64;
  localparam int IW     = 640, IH = 480;
  localparam int SW     = IW / 2, SH = IH / 2;
  localparam int BX     = (SW + CB - 1) / CB, BY = (SH + CB - 1) / CB;
  localparam int NBLK   = 4 * BX * BY;
  localparam int BUDGET = 100_000_000 / 30;

  logic                 clk = 0, rst_n = 0;
  logic                 in_valid = 0, in_ready, out_ready = 1;
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
  int img [IH][IW];
  int sub [4][SH][SW];       // LL, HL, LH, HH
  ref_pair_t exp_q [3][$];
  ref_pair_t got_q [3][$];
  int exp_cycles = 0, cycles = 0, nbp_hist [17];
  bit started = 0, feeding_done = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int blk_sample(int b, int y, int x);
    int s, bx, by, yy, xx;
    s  = b / (BX * BY);
    by = (b % (BX * BY)) / BX;
    bx = b % BX;
    yy = by * CB + y;
    xx = bx * CB + x;
    if (yy >= SH || xx >= SW) return 0;
    return sub[s][yy][xx];
  endfunction

  initial begin
    cm_ref m;
    // image and one-level Haar transform
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++)
        img[y][x] = 128 + int'(60.0 * $sin(x / 37.0) * $cos(y / 23.0))
                  + (((x / 16) + (y / 16)) % 2) * 20 + int'($urandom % 9) - 4;
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW; x++) begin
        int a, b, c, d, l0, h0, l1, h1;
        a = img[2*y][2*x]; b = img[2*y][2*x+1]; c = img[2*y+1][2*x]; d = img[2*y+1][2*x+1];
        l0 = (a + b) >>> 1; h0 = a - b;       // horizontal, top row
        l1 = (c + d) >>> 1; h1 = c - d;       // horizontal, bottom row
        sub[0][y][x] = (l0 + l1) >>> 1;       // LL
        sub[1][y][x] = (h0 + h1) >>> 1;       // HL: horizontal high-pass
        sub[2][y][x] = l0 - l1;               // LH: vertical high-pass
        sub[3][y][x] = h0 - h1;               // HH
      end
    for (int b = 0; b < NBLK; b++) begin
      m = new(CB, CB);
      m.band = b / (BX * BY);
      for (int y = 0; y < CB; y++)
        for (int x = 0; x < CB; x++) begin
          int v;
          v = blk_sample(b, y, x);
          m.sgn[y][x] = v < 0;
          m.mag[y][x] = (v < 0) ? -v : v;
        end
      m.run();
      for (int p = 0; p < 3; p++) foreach (m.q[p][i]) exp_q[p].push_back(m.q[p][i]);
      exp_cycles += m.nbp * CB * CB / 4;
      nbp_hist[m.nbp]++;
    end
  end

  // feeder: full rate
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    started = 1;
    for (int b = 0; b < NBLK; b++)
      for (int y = 0; y < CB; y++)
        for (int x = 0; x < CB; x++) begin
          @(negedge clk);
          in_valid = 1;
          in_data  = DATA_W'(blk_sample(b, y, x));
          in_band  = band_e'(b / (BX * BY));
          while (!in_ready) @(negedge clk);
        end
    @(negedge clk);
    in_valid = 0;
    feeding_done = 1;
  end

  always @(negedge clk) if (rst_n) begin
    ref_pair_t e;
    cycles++;
    if (spp_tag.valid) for (int i = 0; i < int'(spp_n); i++) begin
      e.bp = int'(spp_tag.bp); e.cx = int'(spp_cxd[i].cx); e.d = int'(spp_cxd[i].d); got_q[0].push_back(e);
    end
    if (mrp_tag.valid) for (int i = 0; i < int'(mrp_n); i++) begin
      e.bp = int'(mrp_tag.bp); e.cx = int'(mrp_cxd[i].cx); e.d = int'(mrp_cxd[i].d); got_q[1].push_back(e);
    end
    if (cup_tag.valid) for (int i = 0; i < int'(cup_n); i++) begin
      e.bp = int'(cup_tag.bp); e.cx = int'(cup_cxd[i].cx); e.d = int'(cup_cxd[i].d); got_q[2].push_back(e);
    end
  end

  initial begin
    int idle, last_busy;
    idle = 0;
    last_busy = 0;
    wait (feeding_done);
    while (idle < 20) begin
      @(negedge clk);
      if (busy || spp_tag.valid || mrp_tag.valid || cup_tag.valid) begin idle = 0; last_busy = cycles; end
      else idle++;
    end
    for (int p = 0; p < 3; p++) begin
      check(got_q[p].size() == exp_q[p].size(),
            $sformatf("pass %0d: %0d pairs, expected %0d", p, got_q[p].size(), exp_q[p].size()));
      for (int i = 0; i < exp_q[p].size() && i < got_q[p].size(); i++)
        check(got_q[p][i] == exp_q[p][i], $sformatf("pass %0d pair %0d differs", p, i));
    end
    $display("frame %0dx%0d: %0d blocks, %0d pairs, %0d cycles (pure coding %0d), budget %0d",
             IW, IH, NBLK, exp_q[0].size() + exp_q[1].size() + exp_q[2].size(), last_busy, exp_cycles, BUDGET);
    $display("frames per second at 100 MHz: %0d", 100_000_000 / last_busy);
    for (int i = 0; i <= 16; i++) if (nbp_hist[i] > 0) $display("  blocks with %0d bit-planes: %0d", i, nbp_hist[i]);
    check(last_busy <= BUDGET, "frame does not fit 30 frames per second at 100 MHz");
    check(last_busy >= exp_cycles, "fewer cycles than one stripe column per cycle allows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
