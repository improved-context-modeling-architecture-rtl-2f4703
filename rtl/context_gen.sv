// context_gen: context generation module of the pass-pipelined coder.
//
// The three coding passes of a bit-plane run at the same time on one stripe,
// a few columns apart. Stripe columns enter a seven-column process window at
// j = 0 and move one position per cycle; the significance propagation pass
// (SPP) works on the column at j = 1, magnitude refinement (MRP) at j = 3 and
// cleanup (CUP) at j = 5. Each pass finds, for each of the four rows, its pass
// flag (is the sample coded in this pass), the significance of the eight
// neighbours as that pass must see them, and updates the column in place
// before it moves on:
//   SPP  flag = not significant and some neighbour significant; a coded 1
//        makes the sample significant at once, which rows below see.
//   MRP  flag = significant and not coded by SPP; sets the refinement state.
//   CUP  flag = not coded by SPP/MRP; a coded 1 makes the sample significant.
// Because SPP is two columns ahead of MRP and four ahead of CUP, every pass
// sees its right-hand neighbour already through the earlier passes and its
// left-hand neighbour through its own pass, as in sequential coding.
// The row above the stripe (row 0) comes from a line buffer holding the
// bottom row of the previous stripe; for SPP and MRP it is masked by a
// "became significant in this cleanup pass" bit, since in sequential coding
// those passes of stripe s come before the cleanup of stripe s-1.
// The row below the stripe is treated as insignificant (vertically causal
// context formation), which lets all passes of a stripe finish together.
//
// State memory: per sample significance (sigma) and refinement (sigma'),
// read when a column is issued and written when it leaves the window. The
// coding state (eta) lives only in the window. The first coded bit-plane of a
// block reads the state as zero, so no clearing is needed between blocks.
// The same address is read again at the earliest CB_W * CB_H / 4 cycles
// later; CB_W >= 16 keeps read-after-write ordering for both memories.
//
// Timing: tag/address in cycle t (from the control unit), memory data in
// t+1, window entry in t+2, pass outputs registered 1, 3 and 5 cycles after
// entry. Everything advances only while en is high.
//
// The pass positions in the window, the pass-flag rules and the immediate
// in-column updates follow the published pass-pipelined architecture. The
// causal treatment of the stripe below, the line buffer with its cleanup
// mask and the state-memory organisation are this implementation's choices.
module context_gen
  import cm_pkg::*;
#(
  parameter int unsigned CB_W  = 64,
  parameter int unsigned CB_H  = 64,
  parameter int unsigned MAG_W = 16,
  localparam int unsigned AW   = $clog2(CB_W * CB_H / 4),
  localparam int unsigned CW   = $clog2(CB_W)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  // issued column (cycle t)
  input  col_tag_t              iss_tag,
  input  logic [AW-1:0]         iss_addr,
  input  logic [CW-1:0]         iss_col,
  // its sample data (cycle t+1)
  input  logic [3:0]            rd_sign,
  input  logic [3:0][MAG_W-1:0] rd_mag,
  // to the primitive operator generation module
  output pass_info_t            spp_o,
  output pass_info_t            mrp_o,
  output pass_info_t            cup_o
);
  typedef struct packed {
    col_tag_t      tag;
    logic [AW-1:0] addr;
    logic [CW-1:0] col;
    logic [3:0]    bits;
    logic [3:0]    sign;
    logic [3:0]    sig;     // sigma
    logic [3:0]    refd;    // sigma'
    logic [3:0]    coded;   // eta
    logic [3:0]    cupnew;  // became significant in this bit-plane's CUP
    logic          r0_sig;  // row above the stripe
    logic          r0_sgn;
    logic          r0_cupnew;
  } win_col_t;

  win_col_t      w   [WIN_COLS];
  win_col_t      upd [WIN_COLS];
  win_col_t      ent;
  col_tag_t      tag1;
  logic [AW-1:0] addr1;
  logic [CW-1:0] col1;
  logic [7:0]    st_rd;
  logic [2:0]    lb_rd;
  pass_info_t    spp_d, mrp_d, cup_d;

  // ---------------------------------------------------------------- memories
  sdp_ram #(.DEPTH(CB_W * CB_H / 4), .WIDTH(8)) u_state (
    .clk   (clk),
    .we    (en && w[WIN_COLS-1].tag.valid),
    .waddr (w[WIN_COLS-1].addr),
    .wdata ({w[WIN_COLS-1].refd, w[WIN_COLS-1].sig}),
    .re    (en),
    .raddr (iss_addr),
    .rdata (st_rd)
  );

  sdp_ram #(.DEPTH(CB_W), .WIDTH(3)) u_line (
    .clk   (clk),
    .we    (en && w[WIN_COLS-1].tag.valid),
    .waddr (w[WIN_COLS-1].col),
    .wdata ({w[WIN_COLS-1].cupnew[3], w[WIN_COLS-1].sign[3], w[WIN_COLS-1].sig[3]}),
    .re    (en),
    .raddr (iss_col),
    .rdata (lb_rd)
  );

  // ------------------------------------------------------- column formation
  always_comb begin
    ent           = '0;
    ent.tag       = tag1;
    ent.addr      = addr1;
    ent.col       = col1;
    ent.sign      = rd_sign;
    for (int r = 0; r < 4; r++) ent.bits[r] = 1'(rd_mag[r] >> tag1.bp);
    if (!tag1.first_bp) begin
      ent.sig  = st_rd[3:0];
      ent.refd = st_rd[7:4];
    end
    if (!tag1.top) begin
      ent.r0_sig    = lb_rd[0];
      ent.r0_sgn    = lb_rd[1];
      ent.r0_cupnew = lb_rd[2];
    end
  end

  // ----------------------------------------------------------- pass engines
  // significance of window row r (0 = above stripe, 1..4 stripe, 5 = below)
  // of column x as seen by pass p
  function automatic logic sig_at(input win_col_t x, input logic ok, input int r, input pass_e p);
    if (!ok || !x.tag.valid)  return 1'b0;
    if (r == 0)               return x.r0_sig && (p == PASS_CUP || !x.r0_cupnew);
    if (r == 5)               return 1'b0;
    return x.sig[r-1];
  endfunction

  function automatic logic sgn_at(input win_col_t x, input int r);
    if (r == 0)               return x.r0_sgn;
    if (r == 5)               return 1'b0;
    return x.sign[r-1];
  endfunction

  // runs pass p on column x with neighbours lf (column c-1) and rt (c+1);
  // returns the updated column and the per-row information
  task automatic run_pass(input win_col_t x, input win_col_t lf, input win_col_t rt,
                          input pass_e p, output win_col_t y, output pass_info_t o);
    logic   lok, rok, ext;
    logic [3:0] cur;
    nbr_t   nb;
    logic   flag;
    y   = x;
    o   = '0;
    lok = !x.tag.first;
    rok = !x.tag.last;
    cur = x.sig;
    o.valid    = x.tag.valid;
    o.bp       = x.tag.bp;
    o.pass_end = x.tag.pass_end;
    o.cb_end   = x.tag.cb_end;
    o.band     = x.tag.band;
    // run mode (CUP): all four uncoded and insignificant, no significant
    // neighbour outside the column
    ext = sig_at(x, 1'b1, 0, p);
    for (int r = 0; r <= 5; r++) ext |= sig_at(lf, lok, r, p) | sig_at(rt, rok, r, p);
    o.run = (p == PASS_CUP) && (&(~x.coded & ~x.sig)) && !ext;
    for (int i = 0; i < 4; i++) begin
      nb.h_sig[0] = sig_at(lf, lok, i + 1, p);
      nb.h_sgn[0] = sgn_at(lf, i + 1);
      nb.h_sig[1] = sig_at(rt, rok, i + 1, p);
      nb.h_sgn[1] = sgn_at(rt, i + 1);
      nb.v_sig[0] = (i == 0) ? sig_at(x, 1'b1, 0, p) : cur[i-1];
      nb.v_sgn[0] = sgn_at(x, i);
      nb.v_sig[1] = (i == 3) ? 1'b0 : cur[i+1];
      nb.v_sgn[1] = sgn_at(x, i + 2);
      nb.d_sig[0] = sig_at(lf, lok, i, p);
      nb.d_sig[1] = sig_at(lf, lok, i + 2, p);
      nb.d_sig[2] = sig_at(rt, rok, i, p);
      nb.d_sig[3] = sig_at(rt, rok, i + 2, p);
      unique case (p)
        PASS_SPP: flag = !cur[i] && (|{nb.h_sig, nb.v_sig, nb.d_sig});
        PASS_MRP: flag = cur[i] && !x.coded[i];
        default:  flag = !cur[i] && !x.coded[i];
      endcase
      flag = flag && x.tag.valid;
      o.rows[i].coded   = flag;
      o.rows[i].bit_v   = x.bits[i];
      o.rows[i].sign    = x.sign[i];
      o.rows[i].refined = x.refd[i];
      o.rows[i].nb      = nb;
      if (flag) begin
        y.coded[i] = 1'b1;
        if (p == PASS_MRP) y.refd[i] = 1'b1;
        else if (x.bits[i]) begin
          cur[i] = 1'b1;
          if (p == PASS_CUP) y.cupnew[i] = 1'b1;
        end
      end
    end
    y.sig = cur;
  endtask

  always_comb begin
    for (int j = 0; j < int'(WIN_COLS); j++) upd[j] = w[j];
    run_pass(w[POS_SPP], w[POS_SPP+1], w[POS_SPP-1], PASS_SPP, upd[POS_SPP], spp_d);
    run_pass(w[POS_MRP], w[POS_MRP+1], w[POS_MRP-1], PASS_MRP, upd[POS_MRP], mrp_d);
    run_pass(w[POS_CUP], w[POS_CUP+1], w[POS_CUP-1], PASS_CUP, upd[POS_CUP], cup_d);
  end

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag1  <= '0;
      addr1 <= '0;
      col1  <= '0;
      for (int j = 0; j < int'(WIN_COLS); j++) w[j] <= '0;
      spp_o <= '0;
      mrp_o <= '0;
      cup_o <= '0;
    end else if (en) begin
      tag1  <= iss_tag;
      addr1 <= iss_addr;
      col1  <= iss_col;
      w[0]  <= ent;
      for (int j = 1; j < int'(WIN_COLS); j++) w[j] <= upd[j-1];
      spp_o <= spp_d;
      mrp_o <= mrp_d;
      cup_o <= cup_d;
    end
  end

  initial assert (CB_W >= 16 && CB_H % 4 == 0)
    else $error("context_gen: needs CB_W >= 16 and CB_H a multiple of 4");
endmodule
