// cg_control: context generator control unit.
//
// Walks a code block held in the dual memories bit-plane by bit-plane, from
// the most significant non-zero bit-plane down to bit-plane 0, and within a
// bit-plane stripe by stripe and column by column. Each cycle it issues one
// stripe column: the memory address (stripe * CB_W + column), the column
// index for the stripe line buffer, and a tag with the column's position
// (first/last of stripe, top stripe, first bit-plane, end of bit-plane, end
// of block), bit-plane and subband. All three passes are fed from this single
// stream, so a block of N bit-planes takes N * CB_W * CB_H / 4 issue cycles.
// After the last column of a block it releases the memory and, two idle
// cycles later, issues the next block if one is waiting; a block without any 1 bit
// is released without being read.
// Everything advances only while en is high (output back-pressure).
// The role (addressing, data select, valid) follows the design; the
// sequencing details, tags and release handshake are this implementation's.
module cg_control
  import cm_pkg::*;
#(
  parameter int unsigned CB_W  = 64,
  parameter int unsigned CB_H  = 64,
  parameter int unsigned MAG_W = 16,
  localparam int unsigned AW    = $clog2(CB_W * CB_H / 4),
  localparam int unsigned CW    = $clog2(CB_W),
  localparam int unsigned SW    = (CB_H > 4) ? $clog2(CB_H / 4) : 1,
  localparam int unsigned NBP_W = $clog2(MAG_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  // code block waiting in the dual memories
  input  logic             blk_ready,
  input  band_e            blk_band,
  input  logic [NBP_W-1:0] blk_nbp,
  output logic             blk_release,
  // issued stripe column
  output col_tag_t         iss_tag,
  output logic [AW-1:0]    iss_addr,
  output logic [CW-1:0]    iss_col,
  output logic             busy
);
  localparam int unsigned NSTRIPE = CB_H / 4;

  logic [4:0]    bp, top_bp;
  logic [SW-1:0] s;
  logic [CW-1:0] c;
  band_e         band;
  logic          last_col, last_stripe, last_all;

  assign last_col    = c == CW'(CB_W - 1);
  assign last_stripe = s == SW'(NSTRIPE - 1);
  assign last_all    = last_col && last_stripe && bp == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      bp          <= '0;
      top_bp      <= '0;
      s           <= '0;
      c           <= '0;
      band        <= BAND_LL;
      blk_release <= 1'b0;
      iss_tag     <= '0;
      iss_addr    <= '0;
      iss_col     <= '0;
    end else if (en) begin
      blk_release   <= 1'b0;
      iss_tag.valid <= 1'b0;
      if (busy) begin
        iss_tag.valid    <= 1'b1;
        iss_tag.first    <= c == '0;
        iss_tag.last     <= last_col;
        iss_tag.top      <= s == '0;
        iss_tag.first_bp <= bp == top_bp;
        iss_tag.bp       <= bp;
        iss_tag.pass_end <= last_col && last_stripe;
        iss_tag.cb_end   <= last_all;
        iss_tag.band     <= band;
        iss_addr         <= AW'(int'(s) * int'(CB_W) + int'(c));
        iss_col          <= c;
        if (last_col) begin
          c <= '0;
          if (last_stripe) begin
            s  <= '0;
            bp <= bp - 1'b1;
          end else begin
            s <= s + 1'b1;
          end
        end else begin
          c <= c + 1'b1;
        end
        if (last_all) begin
          busy        <= 1'b0;
          blk_release <= 1'b1;
        end
      end else if (blk_ready && !blk_release) begin
        if (blk_nbp == '0) begin
          blk_release <= 1'b1;
        end else begin
          busy   <= 1'b1;
          bp     <= 5'(blk_nbp - 1'b1);
          top_bp <= 5'(blk_nbp - 1'b1);
          s      <= '0;
          c      <= '0;
          band   <= blk_band;
        end
      end
    end
  end
endmodule
