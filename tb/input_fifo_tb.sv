// input_fifo_tb: random pushes and pops against a queue model. Checks the
// data order, full (wr_ready low exactly at DEPTH entries) and empty
// (rd_valid low exactly at zero entries), and simultaneous push/pop.
`timescale 1ns/1ps
module input_fifo_tb;
  localparam int W = 18, D = 16;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_both = 0;

  input_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases: fill-heavy, drain-heavy, mixed
      int pw;
      pw = (cyc % 1000 < 300) ? 90 : (cyc % 1000 < 600) ? 20 : 50;
      wr_valid <= ($urandom % 100) < pw;
      wr_data  <= W'($urandom);
      rd_ready <= ($urandom % 100) < (100 - pw);
      @(negedge clk);
      check(rd_valid == (q.size() != 0), "rd_valid vs occupancy");
      check(wr_ready == (q.size() != D), "wr_ready vs occupancy");
      if (rd_valid && q.size() != 0) check(rd_data == q[0], "data order");
      if (!wr_ready) n_full++;
      if (wr_valid && wr_ready && rd_valid && rd_ready) n_both++;
      begin
        bit do_pop, do_push;
        logic [W-1:0] d;
        do_pop = rd_valid && rd_ready; do_push = wr_valid && wr_ready; d = wr_data;
        @(posedge clk);
        if (do_pop) void'(q.pop_front());
        if (do_push) q.push_back(d);
      end
    end
    check(n_full > 0, "never full");
    check(n_both > 0, "never push and pop together");
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
