// math_engine: the DWT/IDWT math engine, one 1-D 9/7 lifting transform in
// either direction on a shared pair stream.
//
// mode selects the forward (dwt97_fwd) or inverse (dwt97_inv) data path.
// Both paths are built, as separate hardware, and the input stream is steered
// to the selected one; the output is taken from the path that was fed. mode
// must be held steady while a line is in flight (12 clocks after its last
// pair). Input: pairs in source order ((x_2k, x_2k+1) for the DWT, (s_k, d_k)
// for the IDWT). Output: (s_k, d_k) for the DWT, (x_2k, x_2k+1) for the IDWT.
//
// Timing: 12 clocks from pair k in to pair k out, one pair per clock.
module math_engine
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  input  pair_t in,
  output pair_t out
);

  pair_t in_f, in_i, out_f, out_i;

  always_comb begin
    in_f       = in;
    in_i       = in;
    in_f.valid = in.valid && (mode == MODE_DWT);
    in_i.valid = in.valid && (mode == MODE_IDWT);
  end

  dwt97_fwd u_fwd (.clk, .rst_n, .in(in_f), .out(out_f));
  dwt97_inv u_inv (.clk, .rst_n, .in(in_i), .out(out_i));

  assign out = out_f.valid ? out_f : out_i;

endmodule
