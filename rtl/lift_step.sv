// lift_step: one pipelined integer lifting step on a stream of sample pairs.
//
// A pair stream carries (e_k, o_k) for k = 0 .. N/2-1 of one line, one pair
// per valid cycle, with sol/eol marking the first and last pair of the line.
//   PREDICT: o_k <- o_k +/- floor(c * (e_k + e_{k+1}))   (alpha, gamma steps)
//   UPDATE : e_k <- e_k +/- floor(c * (o_k + o_{k-1}))   (beta, delta steps)
// SUB = 0 adds (forward transform); SUB = 1 subtracts, which undoes the same
// step exactly, because the floored product is recomputed from samples the
// inverse still has (integer-to-integer lifting).
// Line ends use whole-sample symmetric extension: e_{N/2} = e_{N/2-1} and
// o_{-1} = o_0. This is a choice of this design; the extension rule is not
// fixed by the source description.
//
// PREDICT needs the next pair, so it holds each pair in a register until the
// next pair of the line arrives (or emits it at once when it is the last of
// its line). The hold register also lets the input stream have gaps.
// UPDATE keeps the previous odd sample in a register, as in the feedback
// register of the data path figures.
//
// Timing (gap-free stream): UPDATE output lags its input by 2 clocks
// (product register, sum register); PREDICT by 3 (hold, product, sum).
module lift_step
  import dwt_pkg::*;
#(
  parameter step_e STEP = PREDICT,
  parameter coef_e COEF = C_ALPHA,
  parameter bit    SUB  = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  pair_t in,
  output pair_t out
);

  pair_t                hold;       // PREDICT: pair waiting for its successor
  sample_t              prev_o;     // UPDATE: odd sample of the previous pair
  pair_t                s1;         // pair travelling with the product
  logic signed [DW:0]   sum;        // sum of the two neighbours
  pair_t                cur;        // pair whose sample is updated this cycle
  acc_t                 prod;
  sample_t              delta_q;    // floored product

  // Select the pair and neighbour sum for this cycle.
  always_comb begin
    if (STEP == PREDICT) begin
      cur       = hold;
      cur.valid = hold.valid && (in.valid || hold.eol);
      sum       = (DW+1)'(hold.e) + (DW+1)'(hold.eol ? hold.e : in.e);
    end else begin
      cur       = in;
      sum       = (DW+1)'(in.o) + (DW+1)'(in.sol ? in.o : prev_o);
    end
  end

  csd_mult #(.COEF(COEF), .XW(DW + 1)) u_mult (
    .clk  (clk),
    .x    (sum),
    .prod (prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold   <= '0;
      prev_o <= '0;
      s1     <= '0;
    end else begin
      s1 <= cur;
      if (STEP == PREDICT) begin
        if (in.valid)      hold <= in;
        else if (cur.valid) hold.valid <= 1'b0;
      end else if (in.valid) begin
        prev_o <= in.o;
      end
    end
  end

  assign delta_q = sample_t'(prod >>> FRAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0;
    end else begin
      out <= s1;
      if (STEP == PREDICT) out.o <= SUB ? s1.o - delta_q : s1.o + delta_q;
      else                 out.e <= SUB ? s1.e - delta_q : s1.e + delta_q;
    end
  end

endmodule
