// scale_step: final (DWT) or first (IDWT) scaling of the pair stream.
//
// The forward transform multiplies the even (low-pass) sample by 1/K and
// the odd (high-pass) sample by K; the inverse multiplies the even sample by
// K and the odd one by 1/K. K ~ 1.1311 and 1/K ~ 0.8841 are the kappa and
// kappa^-1 shift-add networks of csd_mult. Products are floored to integers.
// The inverse data path drawing labels the odd scale "-1/K"; here the sign is
// kept positive so that the inverse lifting steps (which subtract) undo the
// forward ones, which is what the sign there has to achieve.
// Flooring makes this the one step that is not exactly invertible: a forward
// and inverse pair reconstructs to within a few counts, not bit-exactly.
//
// Timing: 2 clocks (product register, floor register), one pair per clock.
module scale_step
  import dwt_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  pair_t in,
  output pair_t out
);

  localparam coef_e CE = INVERSE ? C_KAPPA     : C_KAPPA_INV;
  localparam coef_e CO = INVERSE ? C_KAPPA_INV : C_KAPPA;

  acc_t  pe, po;
  pair_t s1;

  csd_mult #(.COEF(CE), .XW(DW)) u_even (.clk(clk), .x(in.e), .prod(pe));
  csd_mult #(.COEF(CO), .XW(DW)) u_odd  (.clk(clk), .x(in.o), .prod(po));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1  <= '0;
      out <= '0;
    end else begin
      s1    <= in;
      out   <= s1;
      out.e <= sample_t'(pe >>> FRAC);
      out.o <= sample_t'(po >>> FRAC);
    end
  end

endmodule
