// rlc_op: run-length coding primitive operator of the cleanup pass.
//
// When a stripe column is in run mode (all four samples still uncoded and
// without significant neighbours), one run-length symbol (context 17) tells
// whether any of the four bits is 1. If one is, two uniform symbols (context
// 18, MSB first) give the row index k of the first 1; that sample's sign is
// then sign-coded and the rows below k are coded normally. Outputs the three
// pairs with their valid bits, the interrupt row k and a mask of the rows the
// run has already accounted for (their zero-coding symbol is suppressed).
// Purely combinational.
// The operator is one of the four the design names; its table is the
// one of the JPEG2000 standard.
module rlc_op
  import cm_pkg::*;
(
  input  logic       run,
  input  logic [3:0] bits,      // magnitude bits of rows 0..3
  output cxd_t       rl,
  output logic       rl_valid,
  output cxd_t [1:0] uni,       // [0] = MSB of k, [1] = LSB of k
  output logic       uni_valid,
  output logic [1:0] k,
  output logic [3:0] covered    // rows whose ZC symbol the run replaces
);
  always_comb begin
    k = 2'd0;
    for (int i = 3; i >= 0; i--) if (bits[i]) k = 2'(i);
    rl_valid  = run;
    rl.cx     = CX_RL;
    rl.d      = |bits;
    uni_valid = run && (|bits);
    uni[0].cx = CX_UNI;
    uni[0].d  = k[1];
    uni[1].cx = CX_UNI;
    uni[1].d  = k[0];
    covered   = '0;
    if (run) begin
      for (int i = 0; i < 4; i++)
        if (!(|bits) || i <= int'(k)) covered[i] = 1'b1;
    end
  end
endmodule
