// sc_op: sign-coding primitive operator.
//
// Each of the horizontal and vertical neighbour pairs contributes +1 for a
// significant positive neighbour and -1 for a significant negative one; each
// sum is clipped to -1..+1. The pair (Hc, Vc) selects one of the sign
// contexts 9..13 and an XOR bit; the decision is the sample's sign XOR that
// bit, as in the JPEG2000 sign-coding table. Purely combinational.
// The operator is one of the four the design names; its table is the
// one of the JPEG2000 standard.
module sc_op
  import cm_pkg::*;
(
  input  nbr_t       nb,
  input  logic       sign,
  output logic [4:0] cx,
  output logic       d
);
  logic signed [2:0] hs, vs;
  logic signed [1:0] hc, vc;
  logic              xr;

  function automatic logic signed [2:0] contrib(input logic sig, input logic sgn);
    if (!sig)     return 3'sd0;
    else if (sgn) return -3'sd1;
    else          return 3'sd1;
  endfunction

  always_comb begin
    hs = contrib(nb.h_sig[0], nb.h_sgn[0]) + contrib(nb.h_sig[1], nb.h_sgn[1]);
    vs = contrib(nb.v_sig[0], nb.v_sgn[0]) + contrib(nb.v_sig[1], nb.v_sgn[1]);
    hc = (hs > 0) ? 2'sd1 : (hs < 0) ? -2'sd1 : 2'sd0;
    vc = (vs > 0) ? 2'sd1 : (vs < 0) ? -2'sd1 : 2'sd0;
    // fold the table: negative Hc (or Hc = 0 with negative Vc) mirrors it
    xr = (hc < 0) || (hc == 0 && vc < 0);
    if (hc == 0) begin
      cx = (vc == 0) ? 5'd9 : 5'd10;
    end else begin
      // Hc = +1: Vc +1 -> 13, 0 -> 12, -1 -> 11 ; Hc = -1 mirrored in Vc
      if ((hc > 0 && vc > 0) || (hc < 0 && vc < 0))      cx = 5'd13;
      else if (vc == 0)                                  cx = 5'd12;
      else                                               cx = 5'd11;
    end
    d = sign ^ xr;
  end
endmodule
