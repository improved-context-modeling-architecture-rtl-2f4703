// cg_control_tb: feeds the control unit a sequence of code blocks (given
// as bit-plane counts, one of them 0) on a 16 x 8 block with random stalls
// (en low) and checks every issued column: address, column, all tag fields,
// the order bit-plane -> stripe -> column, exactly one issue per enabled
// cycle while busy (one stripe column per cycle), the release after the last
// column, and that an all-zero block is released without issuing anything.
`timescale 1ns/1ps
module cg_control_tb;
  import cm_pkg::*;
  localparam int CW = 16, CH = 8, NS = CH / 4;
  logic clk = 0, rst_n = 0, en = 0;
  logic blk_ready = 0, blk_release, busy;
  band_e blk_band = BAND_LL;
  logic [4:0] blk_nbp = '0;
  col_tag_t iss_tag;
  logic [4:0] iss_addr;
  logic [3:0] iss_col;
  int nbps [5] = '{3, 0, 1, 5, 2};
  int checks = 0, failures = 0, n_stall = 0;
  logic en_seen = 0;   // en as sampled by the design at the last edge

  always @(posedge clk) en_seen <= en;

  cg_control #(.CB_W(CW), .CB_H(CH), .MAG_W(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    en <= rst_n && ($urandom % 4 != 0);
    if (!en) n_stall++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 5; b++) begin
      int cycles;
      blk_ready <= 1; blk_nbp <= 5'(nbps[b]); blk_band <= band_e'(b % 4);
      cycles = 0;
      for (int bp = nbps[b] - 1; bp >= 0; bp--)
        for (int s = 0; s < NS; s++)
          for (int c = 0; c < CW; c++) begin
            // wait for the next enabled edge that issues
            do begin
              @(posedge clk); #1;
              if (en && busy) cycles++;
            end while (!(iss_tag.valid && en_seen));
            check(int'(iss_tag.bp) == bp && int'(iss_col) == c && int'(iss_addr) == s * CW + c,
                  $sformatf("blk %0d: issued bp%0d col%0d addr%0d, expected bp%0d s%0d c%0d", b,
                            iss_tag.bp, iss_col, iss_addr, bp, s, c));
            check(iss_tag.first == (c == 0) && iss_tag.last == (c == CW - 1) && iss_tag.top == (s == 0)
                  && iss_tag.first_bp == (bp == nbps[b] - 1)
                  && iss_tag.pass_end == (s == NS - 1 && c == CW - 1)
                  && iss_tag.cb_end == (s == NS - 1 && c == CW - 1 && bp == 0)
                  && iss_tag.band == band_e'(b % 4), "tag fields");
          end
      // release
      do @(posedge clk); while (!(blk_release && en));
      #1;
      if (nbps[b] > 0)
        check(cycles == nbps[b] * NS * CW, $sformatf("blk %0d: %0d enabled busy cycles, expected %0d", b, cycles, nbps[b] * NS * CW));
      check(!busy, "busy after release");
      blk_ready <= 0;
      @(posedge clk);
    end
    check(n_stall > 0, "never stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // nothing may be issued while no block is waiting or being coded
  always @(posedge clk) if (rst_n && !blk_ready && !busy && en) begin
    #1 check(!iss_tag.valid || !en_seen, "issue without a block");
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
