// dwt97_fwd: 9/7 forward integer lifting DWT of one line, one pair per clock.
//
// Input: the line's samples as pairs (x_2k, x_2k+1) with first/last flags.
// Output: pairs (s_k, d_k), the low-pass and high-pass coefficients.
// Five steps in a chain, following the forward data path:
//   d1 = x_odd + floor(alpha*(s0_k + s0_k+1))     alpha = -1.5
//   s1 = x_even + floor(beta *(d1_k + d1_k-1))     beta  = 1/16
//   d2 = d1 + floor(gamma*(s1_k + s1_k+1))         gamma ~ 0.7998
//   s2 = s1 + floor(delta*(d2_k + d2_k-1))         delta = 0.46875
//   s  = floor(s2 / K),  d = floor(d2 * K)         K ~ 1.1311
// The constants are the shift-add approximations of the lifting networks,
// not the irrational CDF values. Each step has two pipeline registers, as in
// the networks; the predict steps add one hold register each.
//
// Timing: with a gap-free input, output pair k appears 12 clocks after input
// pair k, which is 10 clocks after input pair k+2, the last one it depends
// on. Throughput is one pair (two samples) per clock, so an N-sample line
// takes N/2 clocks. Gaps in the input are allowed.
module dwt97_fwd
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  pair_t in,
  output pair_t out
);

  pair_t p1, p2, p3, p4;

  lift_step #(.STEP(PREDICT), .COEF(C_ALPHA), .SUB(1'b0)) u_alpha (.clk, .rst_n, .in(in), .out(p1));
  lift_step #(.STEP(UPDATE),  .COEF(C_BETA),  .SUB(1'b0)) u_beta  (.clk, .rst_n, .in(p1), .out(p2));
  lift_step #(.STEP(PREDICT), .COEF(C_GAMMA), .SUB(1'b0)) u_gamma (.clk, .rst_n, .in(p2), .out(p3));
  lift_step #(.STEP(UPDATE),  .COEF(C_DELTA), .SUB(1'b0)) u_delta (.clk, .rst_n, .in(p3), .out(p4));
  scale_step #(.INVERSE(1'b0))                            u_scale (.clk, .rst_n, .in(p4), .out(out));

endmodule
