// zc_op: zero-coding primitive operator.
//
// Forms the zero-coding context (labels 0..8) of one sample from the number
// of significant horizontal (H), vertical (V) and diagonal (D) neighbours and
// the orientation of the subband, following the JPEG2000 zero-coding table:
// LL and LH rank H first, HL swaps the roles of H and V, HH ranks D first.
// The decision bit that goes with the context is the sample's magnitude bit,
// so this block only forms the context. Purely combinational.
// The operator is one of the four the design names; its table is the
// one of the JPEG2000 standard.
module zc_op
  import cm_pkg::*;
(
  input  band_e      band,
  input  nbr_t       nb,
  output logic [4:0] cx
);
  logic [1:0] h, v, hv_a, hv_b;
  logic [2:0] d;
  logic [2:0] hv;

  always_comb begin
    h  = 2'(nb.h_sig[0]) + 2'(nb.h_sig[1]);
    v  = 2'(nb.v_sig[0]) + 2'(nb.v_sig[1]);
    d  = 3'(nb.d_sig[0]) + 3'(nb.d_sig[1]) + 3'(nb.d_sig[2]) + 3'(nb.d_sig[3]);
    hv = 3'(h) + 3'(v);
    // primary / secondary direction
    if (band == BAND_HL) begin
      hv_a = v; hv_b = h;
    end else begin
      hv_a = h; hv_b = v;
    end
    if (band == BAND_HH) begin
      if (d >= 3)                cx = 5'd8;
      else if (d == 2)           cx = (hv >= 1) ? 5'd7 : 5'd6;
      else if (d == 1)           cx = (hv >= 2) ? 5'd5 : (hv == 1) ? 5'd4 : 5'd3;
      else                       cx = (hv >= 2) ? 5'd2 : (hv == 1) ? 5'd1 : 5'd0;
    end else begin
      if (hv_a == 2)             cx = 5'd8;
      else if (hv_a == 1)        cx = (hv_b >= 1) ? 5'd7 : (d >= 1) ? 5'd6 : 5'd5;
      else if (hv_b == 2)        cx = 5'd4;
      else if (hv_b == 1)        cx = 5'd3;
      else                       cx = (d >= 2) ? 5'd2 : (d == 1) ? 5'd1 : 5'd0;
    end
  end
endmodule
