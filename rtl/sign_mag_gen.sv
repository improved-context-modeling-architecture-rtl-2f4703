// sign_mag_gen: sign and magnitude generator of the input interface.
//
// Converts a two's complement coefficient into a sign bit (1 = negative) and
// an unsigned magnitude of the same width, so that the most negative value
// keeps its exact magnitude. The bit-plane coder works on the magnitude's
// bits and codes the sign separately. Purely combinational.
module sign_mag_gen #(
  parameter int unsigned DATA_W = 16
) (
  input  logic [DATA_W-1:0] coef,   // two's complement
  output logic              sign,
  output logic [DATA_W-1:0] mag
);
  always_comb begin
    sign = coef[DATA_W-1];
    mag  = sign ? (~coef + 1'b1) : coef;
  end
endmodule
