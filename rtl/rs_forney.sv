// rs_forney: Forney error value for RS(15,11) with first root alpha^0.
//
// e = X * Omega(X^-1) / Lambda'(X^-1). In GF(2^m) the derivative of
// Lambda(x) = l0 + l1 x + l2 x^2 is the constant l1, and with
// Omega(x) = w0 + w1 x the formula reduces to
//   e = (w0 * X + w1) * inv(l1).
// The document names the Forney method; the reduction for t = 2 and the
// inverse by table are this design's. Purely combinational.
module rs_forney
  import fec_pkg::*;
(
  input  gf_t x,
  input  gf_t omega [RS_T],
  input  gf_t lambda1,
  output gf_t err_val
);

  assign err_val = gf_mul(gf_mul(omega[0], x) ^ omega[1], gf_inv(lambda1));

endmodule
