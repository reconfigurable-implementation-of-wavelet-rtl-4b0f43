// csd_mult: constant multiplier built only from shifts and adds.
//
// Multiplies a signed operand by one of the six 9/7 lifting constants using
// the shift-add networks of the design (canonic signed digit form):
//   alpha    : (x>>1) - (x<<1)                                  = -1.5
//   beta     : x>>4                                             = 0.0625
//   gamma    : (x - x>>2) + (x>>4 - x>>6) + (x>>8 - x>>10)      ~ 0.7998
//   delta    : (x>>1) - (x>>5)                                  = 0.46875
//   kappa    : ((x>>3 + x) + (x>>7 + x>>12)) - (x>>9 + x>>16)   ~ 1.1311
//   kappa^-1 : (x - x>>3) + ((x>>7 + x>>10) + (x>>12 + x>>14))  ~ 0.8841
// The operand is first placed on a fixed-point grid with FRAC fractional
// bits, so no shift loses a bit and the product equals x * coef_q16(COEF) / 2^16
// exactly. The pairing of terms follows the networks; where the adder order
// of a subtraction is not printed, the order that gives a positive
// coefficient near the CDF 9/7 value is taken.
//
// Timing: one register stage; prod is valid one clock after x.
module csd_mult
  import dwt_pkg::*;
#(
  parameter coef_e COEF = C_ALPHA,
  parameter int unsigned XW = DW + 1  // operand width (a sum of two samples)
) (
  input  logic                 clk,
  input  logic signed [XW-1:0] x,
  output acc_t                 prod   // product, FRAC fractional bits
);

  acc_t t;
  acc_t p;

  assign t = acc_t'(x) <<< FRAC;

  always_comb begin
    case (COEF)
      C_ALPHA:     p = (t >>> 1) - (t <<< 1);
      C_BETA:      p = (t >>> 4);
      C_GAMMA:     p = ((t - (t >>> 2)) + ((t >>> 4) - (t >>> 6))) + ((t >>> 8) - (t >>> 10));
      C_DELTA:     p = (t >>> 1) - (t >>> 5);
      C_KAPPA:     p = (((t >>> 3) + t) + ((t >>> 7) + (t >>> 12))) - ((t >>> 9) + (t >>> 16));
      default:     p = (t - (t >>> 3)) + (((t >>> 7) + (t >>> 10)) + ((t >>> 12) + (t >>> 14)));
    endcase
  end

  always_ff @(posedge clk) prod <= p;

endmodule
