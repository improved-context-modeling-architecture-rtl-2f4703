// cm_top: pass-pipelined JPEG2000 context modeling system.
//
// Turns quantised wavelet coefficients, one code block at a time, into the
// context-data (CX-D) pairs that an MQ arithmetic coder consumes. Instead of
// running the significance propagation (SPP), magnitude refinement (MRP) and
// cleanup (CUP) passes one after the other, all three run concurrently on one
// stripe, a few columns apart, so each bit-plane costs one cycle per stripe
// column (CB_W * CB_H / 4 cycles) and up to 22 pairs appear per cycle.
//
//   input_interface  FIFO, sign/magnitude split, code-block write, bit-plane
//                    count
//   dual_memory      memories A/B and data multiplexer: one block loads while
//                    the other is coded
//   cg_control       bit-plane / stripe / column sequencing and addressing
//   context_gen      process window, pass flags, state updates, state memory
//   prim_gen         ZC, SC, MR and RL operators, packed CX-D lane groups
//
// Pipeline (4 stages): address issue -> memory read -> context generation
// -> primitive operators. A column issued in cycle t gives its SPP pairs in
// t+4, MRP pairs in t+6 and CUP pairs in t+8.
//
// Input: in_valid/in_ready, one two's complement coefficient per transfer,
// raster order within the block, with the subband code. Output: three lane
// groups (SPP, MRP, CUP); in a cycle with out_ready high every group whose tag
// is valid is taken, lanes 0..n-1 holding its pairs in coding order. With
// out_ready low the whole coding pipeline holds (the input side keeps
// loading). The groups of one column leave at different times; the tag's
// bit-plane and end marks let a consumer keep the three passes apart.
// Context formation is vertically causal (the stripe below is not looked at).
// The module split, the concurrent passes, the dual memories and the 22-pair
// peak follow the published architecture; widths, block size, handshakes,
// output format and causal context formation are this implementation's.
module cm_top
  import cm_pkg::*;
#(
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned CB_W       = 64,
  parameter int unsigned CB_H       = 64,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [DATA_W-1:0]    in_data,
  input  band_e                in_band,
  input  logic                 out_ready,
  output grp_tag_t             spp_tag,
  output logic [3:0]           spp_n,
  output cxd_t [SPP_LANES-1:0] spp_cxd,
  output grp_tag_t             mrp_tag,
  output logic [3:0]           mrp_n,
  output cxd_t [MRP_LANES-1:0] mrp_cxd,
  output grp_tag_t             cup_tag,
  output logic [3:0]           cup_n,
  output cxd_t [CUP_LANES-1:0] cup_cxd,
  output logic                 busy       // a code block is being issued
);
  localparam int unsigned AW    = $clog2(CB_W * CB_H / 4);
  localparam int unsigned CW    = $clog2(CB_W);
  localparam int unsigned NBP_W = $clog2(DATA_W + 1);

  logic                   en;
  logic                   wr_valid, wr_ready, wr_sign, wr_blk_done;
  logic [1:0]             wr_row;
  logic [AW-1:0]          wr_addr;
  logic [DATA_W-1:0]      wr_mag;
  band_e                  wr_band, blk_band;
  logic [NBP_W-1:0]       wr_nbp, blk_nbp;
  logic                   blk_ready, blk_release;
  col_tag_t               iss_tag;
  logic [AW-1:0]          iss_addr;
  logic [CW-1:0]          iss_col;
  logic [3:0]             rd_sign;
  logic [3:0][DATA_W-1:0] rd_mag;
  pass_info_t             spp_i, mrp_i, cup_i;

  assign en = out_ready;

  input_interface #(.DATA_W(DATA_W), .CB_W(CB_W), .CB_H(CB_H), .FIFO_DEPTH(FIFO_DEPTH)) u_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_band,
    .wr_valid, .wr_ready, .wr_row, .wr_addr, .wr_sign, .wr_mag,
    .wr_blk_done, .wr_band, .wr_nbp
  );

  dual_memory #(.CB_W(CB_W), .CB_H(CB_H), .MAG_W(DATA_W)) u_mem (
    .clk, .rst_n,
    .wr_valid, .wr_ready, .wr_row, .wr_addr, .wr_sign, .wr_mag,
    .wr_blk_done, .wr_band, .wr_nbp,
    .blk_ready, .blk_band, .blk_nbp,
    .rd_en (en), .rd_addr (iss_addr), .rd_release (blk_release),
    .rd_sign, .rd_mag
  );

  cg_control #(.CB_W(CB_W), .CB_H(CB_H), .MAG_W(DATA_W)) u_ctl (
    .clk, .rst_n, .en,
    .blk_ready, .blk_band, .blk_nbp, .blk_release,
    .iss_tag, .iss_addr, .iss_col, .busy
  );

  context_gen #(.CB_W(CB_W), .CB_H(CB_H), .MAG_W(DATA_W)) u_cg (
    .clk, .rst_n, .en,
    .iss_tag, .iss_addr, .iss_col, .rd_sign, .rd_mag,
    .spp_o (spp_i), .mrp_o (mrp_i), .cup_o (cup_i)
  );

  prim_gen u_pg (
    .clk, .rst_n, .en,
    .spp_i, .mrp_i, .cup_i,
    .spp_tag, .spp_n, .spp_cxd,
    .mrp_tag, .mrp_n, .mrp_cxd,
    .cup_tag, .cup_n, .cup_cxd
  );
endmodule
