// dwt_pkg: types and constants shared by the 9/7 integer lifting engine.
//
// Samples are 16-bit two's complement, the width the design carries through
// every lifting step and stores in memory. Lifting products are formed in a
// wider fixed-point accumulator with FRAC fractional bits: the shift-add
// networks shift an operand right by at most 16 places, so with 16 fractional
// bits every product is exact and the only rounding is the final floor.
//
// A stream of sample pairs (even, odd) carries first/last-of-line flags so
// each lifting step can apply symmetric extension at the row ends.
package dwt_pkg;

  localparam int unsigned DW   = 16;  // sample width
  localparam int unsigned FRAC = 16;  // fractional bits of the lifting products
  localparam int unsigned AW   = 36;  // accumulator width: 17-bit sum, 16 fraction, sign headroom

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [AW-1:0] acc_t;

  // The six shift-add networks of the 9/7 engine.
  typedef enum logic [2:0] {
    C_ALPHA     = 3'd0,
    C_BETA      = 3'd1,
    C_GAMMA     = 3'd2,
    C_DELTA     = 3'd3,
    C_KAPPA     = 3'd4,
    C_KAPPA_INV = 3'd5
  } coef_e;

  // Lifting step shape: PREDICT updates the odd sample from evens k and k+1,
  // UPDATE updates the even sample from odds k and k-1.
  typedef enum logic {
    PREDICT = 1'b0,
    UPDATE  = 1'b1
  } step_e;

  // Transform direction.
  typedef enum logic {
    MODE_DWT  = 1'b0,
    MODE_IDWT = 1'b1
  } mode_e;

  // One element of a pair stream.
  typedef struct packed {
    logic    valid;
    logic    sol;    // first pair of a line
    logic    eol;    // last pair of a line
    sample_t e;      // even (low-pass) sample
    sample_t o;      // odd (high-pass) sample
  } pair_t;

  // Each network's coefficient as an exact multiple of 2^-16, for reference
  // models: alpha = 1/2 - 2, beta = 1/16, gamma = (1-1/4)+(1/16-1/64)+(1/256-1/1024),
  // delta = 1/2 - 1/32, kappa = 1+1/8+1/128+1/4096-1/512-1/65536,
  // kappa^-1 = 1-1/8+1/128+1/1024+1/4096+1/16384.
  function automatic int coef_q16(coef_e c);
    case (c)
      C_ALPHA:     return -98304;
      C_BETA:      return 4096;
      C_GAMMA:     return 52416;
      C_DELTA:     return 30720;
      C_KAPPA:     return 74127;
      default:     return 57940;
    endcase
  endfunction

endpackage
