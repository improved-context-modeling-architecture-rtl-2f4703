// input_interface: input interface module of the context modeler.
//
// Coefficients arrive one per handshake in raster order within a code block
// (CB_W x CB_H, row by row), each with the code of its subband. They pass
// through the input FIFO and the sign/magnitude generator and are written
// into whichever of the two code-block memories is free, at bank = row mod 4
// and address = (row / 4) * CB_W + column. While a block streams in, the
// magnitudes are ORed together; with the last sample the number of bit-planes
// that hold a 1 (index of the highest set bit + 1, or 0) is handed to the
// memories together with the subband of the block's first sample, so the
// coder can start at the most significant non-zero bit-plane.
// One sample is written per cycle whenever the target memory is free.
module input_interface
  import cm_pkg::*;
#(
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned CB_W       = 64,
  parameter int unsigned CB_H       = 64,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned AW    = $clog2(CB_W * CB_H / 4),
  localparam int unsigned NBP_W = $clog2(DATA_W + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [DATA_W-1:0]      in_data,    // two's complement coefficient
  input  band_e                  in_band,
  // towards the dual memories
  output logic                   wr_valid,
  input  logic                   wr_ready,
  output logic [1:0]             wr_row,
  output logic [AW-1:0]          wr_addr,
  output logic                   wr_sign,
  output logic [DATA_W-1:0]      wr_mag,
  output logic                   wr_blk_done,
  output band_e                  wr_band,
  output logic [NBP_W-1:0]       wr_nbp
);
  localparam int unsigned CW = $clog2(CB_W);
  localparam int unsigned RW = $clog2(CB_H);

  logic                   f_valid;
  logic [DATA_W+1:0]      f_data;
  logic [CW-1:0]          col;
  logic [RW-1:0]          row;
  logic [DATA_W-1:0]      or_acc, or_all;
  band_e                  band_q;
  logic                   fire;

  input_fifo #(.WIDTH(DATA_W + 2), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_valid (in_valid),
    .wr_ready (in_ready),
    .wr_data  ({in_band, in_data}),
    .rd_valid (f_valid),
    .rd_ready (wr_ready),
    .rd_data  (f_data)
  );

  sign_mag_gen #(.DATA_W(DATA_W)) u_smg (
    .coef (f_data[DATA_W-1:0]),
    .sign (wr_sign),
    .mag  (wr_mag)
  );

  assign fire        = f_valid && wr_ready;
  assign wr_valid    = f_valid;
  assign wr_row      = row[1:0];
  assign wr_addr     = AW'({row[RW-1:2], col});
  assign wr_blk_done = (col == CW'(CB_W - 1)) && (row == RW'(CB_H - 1));
  assign wr_band     = (col == '0 && row == '0) ? band_e'(f_data[DATA_W+1:DATA_W]) : band_q;
  assign or_all      = or_acc | wr_mag;

  always_comb begin
    wr_nbp = '0;
    for (int b = 0; b < int'(DATA_W); b++)
      if (or_all[b]) wr_nbp = NBP_W'(b + 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col    <= '0;
      row    <= '0;
      or_acc <= '0;
      band_q <= BAND_LL;
    end else if (fire) begin
      if (col == '0 && row == '0) band_q <= band_e'(f_data[DATA_W+1:DATA_W]);
      if (col == CW'(CB_W - 1)) begin
        col <= '0;
        row <= (row == RW'(CB_H - 1)) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
      or_acc <= wr_blk_done ? '0 : or_all;
    end
  end

  initial assert ((CB_W & (CB_W - 1)) == 0 && (CB_H & (CB_H - 1)) == 0 && CB_H >= 4)
    else $error("input_interface: CB_W and CB_H must be powers of two, CB_H >= 4");
endmodule
