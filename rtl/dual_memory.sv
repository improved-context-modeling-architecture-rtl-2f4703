// dual_memory: code-block memories A and B with their data multiplexer.
//
// Two identical buffers each hold one code block as sign + magnitude. While
// the context generator reads one of them, the input interface fills the
// other, so the coder never waits for a block to be loaded. Each buffer is
// split into four banks, one per row of a stripe, so that a whole stripe
// column (four samples) is read in one cycle while samples arrive one at a
// time in raster order. Bank address = stripe * CB_W + column.
//
// Write side: wr_valid/wr_ready; wr_blk_done on the last sample of a block
// marks the buffer full and stores the block's subband and number of
// non-zero bit-planes. Read side: blk_ready says a full buffer is waiting;
// rd_en reads rd_addr from it (data one cycle later, rd_data); rd_release
// (sampled when rd_en is high) frees it and turns the multiplexer to the
// other buffer. The output select is registered with the read so that a
// release in the cycle after the last read does not disturb that read.
// Memories A/B and the multiplexer follow the design; the bank split, the
// full flags and the handshake are this implementation's choices.
module dual_memory
  import cm_pkg::*;
#(
  parameter int unsigned CB_W  = 64,
  parameter int unsigned CB_H  = 64,
  parameter int unsigned MAG_W = 16,
  localparam int unsigned DEPTH = CB_W * CB_H / 4,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned NBP_W = $clog2(MAG_W + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // write side (input interface)
  input  logic                       wr_valid,
  output logic                       wr_ready,
  input  logic [1:0]                 wr_row,       // row within the stripe
  input  logic [AW-1:0]              wr_addr,
  input  logic                       wr_sign,
  input  logic [MAG_W-1:0]           wr_mag,
  input  logic                       wr_blk_done,  // with the block's last sample
  input  band_e                      wr_band,
  input  logic [NBP_W-1:0]           wr_nbp,
  // read side (context generator control unit)
  output logic                       blk_ready,
  output band_e                      blk_band,
  output logic [NBP_W-1:0]           blk_nbp,
  input  logic                       rd_en,
  input  logic [AW-1:0]              rd_addr,
  input  logic                       rd_release,
  output logic [3:0]                 rd_sign,
  output logic [3:0][MAG_W-1:0]      rd_mag
);
  logic [1:0]             full;
  logic                   wptr, rptr, rsel_q;
  band_e                  band_q [2];
  logic [NBP_W-1:0]       nbp_q  [2];
  logic [MAG_W:0]         rdata [2][4];

  assign wr_ready  = !full[wptr];
  assign blk_ready = full[rptr];
  assign blk_band  = band_q[rptr];
  assign blk_nbp   = nbp_q[rptr];

  for (genvar b = 0; b < 2; b++) begin : g_buf
    for (genvar r = 0; r < 4; r++) begin : g_bank
      sdp_ram #(.DEPTH(DEPTH), .WIDTH(MAG_W + 1)) u_bank (
        .clk   (clk),
        .we    (wr_valid && wr_ready && wptr == 1'(b) && wr_row == 2'(r)),
        .waddr (wr_addr),
        .wdata ({wr_sign, wr_mag}),
        .re    (rd_en),
        .raddr (rd_addr),
        .rdata (rdata[b][r])
      );
    end
  end

  // data multiplexer
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      rd_sign[r] = rdata[rsel_q][r][MAG_W];
      rd_mag[r]  = rdata[rsel_q][r][MAG_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full   <= '0;
      wptr   <= 1'b0;
      rptr   <= 1'b0;
      rsel_q <= 1'b0;
      band_q <= '{BAND_LL, BAND_LL};
      nbp_q  <= '{'0, '0};
    end else begin
      if (rd_en) rsel_q <= rptr;
      if (wr_valid && wr_ready && wr_blk_done) begin
        full[wptr]   <= 1'b1;
        band_q[wptr] <= wr_band;
        nbp_q[wptr]  <= wr_nbp;
        wptr         <= ~wptr;
      end
      if (rd_en && rd_release) begin
        a_release_full: assert (full[rptr]) else $error("dual_memory: release of an empty memory");
        full[rptr] <= 1'b0;
        rptr       <= ~rptr;
      end
    end
  end

endmodule
