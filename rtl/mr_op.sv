// mr_op: magnitude-refinement primitive operator.
//
// Context 16 when the sample was refined in an earlier bit-plane (sigma' = 1);
// otherwise 15 when any of its eight neighbours is significant, else 14.
// The decision is the sample's magnitude bit. Purely combinational.
// The operator is one of the four the design names; its table is the
// one of the JPEG2000 standard.
module mr_op
  import cm_pkg::*;
(
  input  logic       refined,
  input  nbr_t       nb,
  input  logic       bit_v,
  output logic [4:0] cx,
  output logic       d
);
  always_comb begin
    if (refined)                                   cx = 5'd16;
    else if (|{nb.h_sig, nb.v_sig, nb.d_sig})      cx = 5'd15;
    else                                           cx = 5'd14;
    d = bit_v;
  end
endmodule
