// input_interface_tb: streams three 16 x 8 code blocks through the input
// interface with random input gaps and random memory back-pressure and checks
// every write: bank (row mod 4), address ((row / 4) * 16 + column), sign and
// magnitude, the end-of-block mark on the last sample only, the block's
// subband and its bit-plane count (highest set magnitude bit + 1, 0 for an
// all-zero block). Also checks that the FIFO fills (in_ready low).
`timescale 1ns/1ps
module input_interface_tb;
  import cm_pkg::*;
  localparam int DW = 16, CW = 16, CH = 8, NB = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, wr_valid, wr_ready = 0, wr_sign, wr_blk_done;
  logic [DW-1:0] in_data = '0, wr_mag;
  band_e in_band = BAND_LL, wr_band;
  logic [1:0] wr_row;
  logic [4:0] wr_addr;
  logic [4:0] wr_nbp;
  int checks = 0, failures = 0, n_bp = 0;
  int vals [NB][CH*CW];

  input_interface #(.DATA_W(DW), .CB_W(CW), .CB_H(CH), .FIFO_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (vals[b, i]) vals[b][i] = (b == 1) ? 0 : (b == 0) ? int'($urandom % 200) - 100
                                      : ((i == 77) ? -32768 : int'($urandom % 9) - 4);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < CH * CW; i++) begin
        @(negedge clk);
        if ($urandom % 5 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = DW'(vals[b][i]); in_band = band_e'(b + 1);
        while (!in_ready) @(negedge clk);
      end
    @(negedge clk);
    in_valid = 0;
  end

  always @(posedge clk) wr_ready <= ($urandom % 3) != 0;
  always @(negedge clk) if (in_valid && !in_ready) n_bp++;

  // checker
  initial begin
    wait (rst_n);
    for (int b = 0; b < NB; b++) begin
      int m;
      m = 0;
      for (int i = 0; i < CH * CW; i++) begin
        int v, y, x, enbp;
        do @(negedge clk); while (!(wr_valid && wr_ready));
        v = vals[b][i]; y = i / CW; x = i % CW;
        m |= (v < 0) ? -v : v;
        check(int'(wr_row) == y % 4 && int'(wr_addr) == (y / 4) * CW + x, $sformatf("address of sample %0d", i));
        check(wr_sign == (v < 0) && int'(wr_mag) == ((v < 0) ? -v : v), $sformatf("value of sample %0d", i));
        check(wr_blk_done == (i == CH * CW - 1), $sformatf("block end at %0d", i));
        if (wr_blk_done) begin
          enbp = 0;
          for (int k = 0; k < 17; k++) if ((m >> k) & 1) enbp = k + 1;
          check(int'(wr_nbp) == enbp, $sformatf("block %0d bit-planes %0d expected %0d", b, wr_nbp, enbp));
          check(wr_band == band_e'(b + 1), "block band");
        end
      end
    end
    check(n_bp > 0, "FIFO never filled");
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
