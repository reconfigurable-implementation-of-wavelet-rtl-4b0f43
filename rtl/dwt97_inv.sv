// dwt97_inv: 9/7 inverse integer lifting DWT of one line, one pair per clock.
//
// Input: pairs (s_k, d_k) of one line; output: pairs (x_2k, x_2k+1).
// The forward steps in reverse order with their signs inverted, following
// the inverse data path:
//   s2 = s * K,  d2 = d / K                        (floored)
//   s1 = s2 - floor(delta*(d2_k + d2_k-1))
//   d1 = d2 - floor(gamma*(s1_k + s1_k+1))
//   x_even = s1 - floor(beta *(d1_k + d1_k-1))
//   x_odd  = d1 - floor(alpha*(x_even_k + x_even_k+1))
// The four lifting steps undo the forward ones exactly; only the scaling is
// lossy, so a DWT followed by this IDWT returns the line to within a few
// counts.
//
// Timing: as the forward path, 12 clocks from pair k in to pair k out with a
// gap-free input, one pair per clock.
module dwt97_inv
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  pair_t in,
  output pair_t out
);

  pair_t p1, p2, p3, p4;

  scale_step #(.INVERSE(1'b1))                            u_scale (.clk, .rst_n, .in(in), .out(p1));
  lift_step #(.STEP(UPDATE),  .COEF(C_DELTA), .SUB(1'b1)) u_delta (.clk, .rst_n, .in(p1), .out(p2));
  lift_step #(.STEP(PREDICT), .COEF(C_GAMMA), .SUB(1'b1)) u_gamma (.clk, .rst_n, .in(p2), .out(p3));
  lift_step #(.STEP(UPDATE),  .COEF(C_BETA),  .SUB(1'b1)) u_beta  (.clk, .rst_n, .in(p3), .out(p4));
  lift_step #(.STEP(PREDICT), .COEF(C_ALPHA), .SUB(1'b1)) u_alpha (.clk, .rst_n, .in(p4), .out(out));

endmodule
