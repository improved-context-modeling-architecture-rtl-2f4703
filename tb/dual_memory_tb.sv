// dual_memory_tb: ping-pong test of memories A/B. Writes code blocks of
// 16 x 8 samples in random order while reading earlier blocks back, and
// checks: read data (one cycle after the address) against what was written
// to that block, the block's subband and bit-plane count, that writing stalls
// (wr_ready low) when both memories are full, that a block is readable only
// after its last sample, and that a release turns to the other memory.
`timescale 1ns/1ps
module dual_memory_tb;
  import cm_pkg::*;
  localparam int CW = 16, CH = 8, MW = 16, DEPTH = CW * CH / 4, NB = 6;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_ready, wr_sign = 0, wr_blk_done = 0;
  logic [1:0] wr_row = '0;
  logic [4:0] wr_addr = '0;
  logic [MW-1:0] wr_mag = '0;
  band_e wr_band = BAND_LL, blk_band;
  logic [4:0] wr_nbp = '0, blk_nbp;
  logic blk_ready, rd_en = 0, rd_release = 0;
  logic [4:0] rd_addr = '0;
  logic [3:0] rd_sign;
  logic [3:0][MW-1:0] rd_mag;
  logic [MW:0] img [NB][4][DEPTH];
  int checks = 0, failures = 0, n_full_stall = 0, blocks_written = 0;

  dual_memory #(.CB_W(CW), .CB_H(CH), .MAG_W(MW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // writer: each block in a random order of (row, address)
  initial begin
    foreach (img[b, r, a]) img[b][r][a] = (MW+1)'($urandom);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 4 * DEPTH; i++) begin
        int r, a;
        r = i % 4; a = (i / 4 * 7) % DEPTH;   // 7 is coprime to DEPTH
        @(negedge clk);
        wr_valid = 1; wr_row = 2'(r); wr_addr = 5'(a);
        {wr_sign, wr_mag} = img[b][r][a];
        wr_blk_done = (i == 4 * DEPTH - 1);
        wr_band = band_e'(b % 4); wr_nbp = 5'(b + 3);
        while (!wr_ready) begin n_full_stall++; @(negedge clk); end
      end
      @(negedge clk);
      blocks_written = b + 1;
      wr_valid = 0; wr_blk_done = 0;
    end
  end

  // reader: waits a while so both memories fill, then reads blocks back
  initial begin
    wait (rst_n);
    repeat (300) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      while (!blk_ready) @(posedge clk);
      check(blocks_written > b, $sformatf("block %0d readable before written", b));
      check(blk_band == band_e'(b % 4) && int'(blk_nbp) == b + 3, $sformatf("block %0d band/bit-planes", b));
      for (int a = 0; a < DEPTH; a++) begin
        rd_en <= 1; rd_addr <= 5'(a); rd_release <= (a == DEPTH - 1);
        @(posedge clk);
        rd_release <= 0;
        #1;
        for (int r = 0; r < 4; r++)
          check({rd_sign[r], rd_mag[r]} == img[b][r][a], $sformatf("block %0d row %0d addr %0d", b, r, a));
      end
      rd_en <= 0;
      @(posedge clk);
    end
    check(n_full_stall > 0, "writer never stalled on two full memories");
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
