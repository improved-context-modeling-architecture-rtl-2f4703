// prim_gen: primitive operator generation module.
//
// Turns the per-row pass information of the three passes into context-data
// (CX-D) pairs, one registered lane group per pass per cycle:
//   SPP  for each row in order: ZC pair if coded, then SC pair if it became
//        significant                                   -> up to 8 pairs
//   MRP  one MR pair per refined row                    -> up to 4 pairs
//   CUP  RL pair (+ two UNI pairs on a run interrupt), then per row ZC pair
//        unless the run covers the row, SC pair if it became significant
//                                                      -> up to 10 pairs
// 22 pairs per cycle in the worst case. Inside each group the valid pairs are
// packed into the lowest lanes in coding order and their number is given,
// so a consumer takes lanes 0..n-1; a group whose column is not valid
// carries no pairs. Each group carries the bit-plane and
// end-of-pass / end-of-block marks of its column. One register stage,
// advancing while en is high.
// The four operators and the 22-pair peak follow the published design; the
// 8/4/10 lane split, the packing and the group tags are this
// implementation's choices.
module prim_gen
  import cm_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  pass_info_t                  spp_i,
  input  pass_info_t                  mrp_i,
  input  pass_info_t                  cup_i,
  output grp_tag_t                    spp_tag,
  output logic [3:0]                  spp_n,
  output cxd_t [SPP_LANES-1:0]        spp_cxd,
  output grp_tag_t                    mrp_tag,
  output logic [3:0]                  mrp_n,
  output cxd_t [MRP_LANES-1:0]        mrp_cxd,
  output grp_tag_t                    cup_tag,
  output logic [3:0]                  cup_n,
  output cxd_t [CUP_LANES-1:0]        cup_cxd
);
  logic [4:0] zc_s [4], zc_c [4], sc_s_cx [4], sc_c_cx [4], mr_cx [4];
  logic       sc_s_d [4], sc_c_d [4], mr_d [4];
  cxd_t       rl;
  cxd_t [1:0] uni;
  logic       rl_v, uni_v;
  logic [1:0] k;
  logic [3:0] covered, cup_bits;

  for (genvar i = 0; i < 4; i++) begin : g_row
    zc_op u_zc_spp (.band(spp_i.band), .nb(spp_i.rows[i].nb), .cx(zc_s[i]));
    sc_op u_sc_spp (.nb(spp_i.rows[i].nb), .sign(spp_i.rows[i].sign), .cx(sc_s_cx[i]), .d(sc_s_d[i]));
    mr_op u_mr     (.refined(mrp_i.rows[i].refined), .nb(mrp_i.rows[i].nb),
                    .bit_v(mrp_i.rows[i].bit_v), .cx(mr_cx[i]), .d(mr_d[i]));
    zc_op u_zc_cup (.band(cup_i.band), .nb(cup_i.rows[i].nb), .cx(zc_c[i]));
    sc_op u_sc_cup (.nb(cup_i.rows[i].nb), .sign(cup_i.rows[i].sign), .cx(sc_c_cx[i]), .d(sc_c_d[i]));
    assign cup_bits[i] = cup_i.rows[i].bit_v;
  end

  rlc_op u_rlc (
    .run       (cup_i.valid && cup_i.run),
    .bits      (cup_bits),
    .rl        (rl),
    .rl_valid  (rl_v),
    .uni       (uni),
    .uni_valid (uni_v),
    .k         (k),
    .covered   (covered)
  );

  cxd_t [SPP_LANES-1:0] spp_c;
  logic [SPP_LANES-1:0] spp_v;
  cxd_t [MRP_LANES-1:0] mrp_c;
  logic [MRP_LANES-1:0] mrp_v;
  cxd_t [10:0]          cup_c;   // RL, UNI, UNI, then ZC/SC per row
  logic [10:0]          cup_v;

  cxd_t [SPP_LANES-1:0] spp_p;
  cxd_t [MRP_LANES-1:0] mrp_p;
  cxd_t [CUP_LANES-1:0] cup_p;
  logic [3:0]           spp_cnt, mrp_cnt, cup_cnt;

  // candidates in coding order
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      spp_c[2*i]   = '{cx: zc_s[i], d: spp_i.rows[i].bit_v};
      spp_v[2*i]   = spp_i.valid && spp_i.rows[i].coded;
      spp_c[2*i+1] = '{cx: sc_s_cx[i], d: sc_s_d[i]};
      spp_v[2*i+1] = spp_i.valid && spp_i.rows[i].coded && spp_i.rows[i].bit_v;
      mrp_c[i]     = '{cx: mr_cx[i], d: mr_d[i]};
      mrp_v[i]     = mrp_i.valid && mrp_i.rows[i].coded;
      cup_c[3+2*i] = '{cx: zc_c[i], d: cup_i.rows[i].bit_v};
      cup_v[3+2*i] = cup_i.valid && cup_i.rows[i].coded && !covered[i];
      cup_c[4+2*i] = '{cx: sc_c_cx[i], d: sc_c_d[i]};
      cup_v[4+2*i] = cup_i.valid && cup_i.rows[i].coded && cup_i.rows[i].bit_v;
    end
    cup_c[0] = rl;     cup_v[0] = rl_v;
    cup_c[1] = uni[0]; cup_v[1] = uni_v;
    cup_c[2] = uni[1]; cup_v[2] = uni_v;
  end

  // pack valid pairs into the lowest lanes
  always_comb begin
    spp_p = '0; mrp_p = '0; cup_p = '0;
    spp_cnt = '0; mrp_cnt = '0; cup_cnt = '0;
    for (int i = 0; i < int'(SPP_LANES); i++)
      if (spp_v[i]) begin spp_p[spp_cnt[2:0]] = spp_c[i]; spp_cnt = spp_cnt + 1'b1; end
    for (int i = 0; i < int'(MRP_LANES); i++)
      if (mrp_v[i]) begin mrp_p[mrp_cnt[1:0]] = mrp_c[i]; mrp_cnt = mrp_cnt + 1'b1; end
    for (int i = 0; i < 11; i++)
      if (cup_v[i] && cup_cnt < 4'(CUP_LANES)) begin
        cup_p[cup_cnt] = cup_c[i];
        cup_cnt = cup_cnt + 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spp_tag <= '0; spp_n <= '0; spp_cxd <= '0;
      mrp_tag <= '0; mrp_n <= '0; mrp_cxd <= '0;
      cup_tag <= '0; cup_n <= '0; cup_cxd <= '0;
    end else if (en) begin
      // a run covers at most the rows up to the interrupt, so at most 10 of
      // the 11 CUP candidates are ever valid together
      a_cup_fits: assert ($countones(cup_v) <= CUP_LANES) else $error("prim_gen: CUP lanes overflow");
      spp_tag <= '{valid: spp_i.valid, bp: spp_i.bp, pass_end: spp_i.pass_end, cb_end: spp_i.cb_end};
      mrp_tag <= '{valid: mrp_i.valid, bp: mrp_i.bp, pass_end: mrp_i.pass_end, cb_end: mrp_i.cb_end};
      cup_tag <= '{valid: cup_i.valid, bp: cup_i.bp, pass_end: cup_i.pass_end, cb_end: cup_i.cb_end};
      spp_n   <= spp_cnt;  spp_cxd <= spp_p;
      mrp_n   <= mrp_cnt;  mrp_cxd <= mrp_p;
      cup_n   <= cup_cnt;  cup_cxd <= cup_p;
    end
  end

endmodule
