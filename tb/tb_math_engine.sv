// tb_math_engine: runs the math engine in both modes. Lines of pixels go
// through the DWT and are checked against the reference model; the engine's
// own coefficients are then fed back in IDWT mode, checked against the
// reference inverse, and the reconstruction is checked to lie within a few
// counts of the original pixels (the scaling step floors, so it is not
// bit-exact). Counts mode switches; each mode must be used.
module tb_math_engine;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mode_e mode;
  pair_t in, out;
  pair_t exp_q[$];
  pair_t got_q[$];
  int checks = 0, failures = 0, n_switch = 0, max_err = 0;

  math_engine dut (.clk, .rst_n, .mode, .in, .out);

  always @(posedge clk) if (rst_n && out.valid) begin
    pair_t ex;
    checks++;
    got_q.push_back(out);
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected output");
    end else begin
      ex = exp_q.pop_front();
      if (out.e !== ex.e || out.o !== ex.o || out.sol !== ex.sol || out.eol !== ex.eol) begin
        failures++;
        $display("FAIL mode %0d got (%0d,%0d) exp (%0d,%0d)", mode, out.e, out.o, ex.e, ex.o);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(line_t a, line_t b);
    for (int k = 0; k < a.size(); k++) begin
      @(negedge clk);
      in = '{valid:1'b1, sol:(k == 0), eol:(k == a.size()-1), e:sample_t'(a[k]), o:sample_t'(b[k])};
    end
    @(negedge clk) in = '0;
    repeat (16) @(negedge clk);
  endtask

  task automatic set_mode(mode_e m);
    if (m != mode) n_switch++;
    mode = m;
  endtask

  initial begin
    in = '0;
    mode = MODE_DWT;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      int n;
      line_t x, xe, xo, s, d, r, gs, gd;
      n = 2 * int'($urandom_range(2, 48));
      x = new[n];
      foreach (x[i]) x[i] = int'($urandom_range(255));
      xe = new[n/2];
      xo = new[n/2];
      for (int k = 0; k < n/2; k++) begin xe[k] = x[2*k]; xo[k] = x[2*k+1]; end
      // forward
      set_mode(MODE_DWT);
      fwd(x, s, d);
      for (int k = 0; k < n/2; k++) exp_q.push_back('{1'b1, k == 0, k == n/2-1, sample_t'(s[k]), sample_t'(d[k])});
      got_q.delete();
      drive(xe, xo);
      gs = new[n/2];
      gd = new[n/2];
      for (int k = 0; k < n/2; k++) begin gs[k] = got_q[k].e; gd[k] = got_q[k].o; end
      // inverse of the engine's own coefficients
      set_mode(MODE_IDWT);
      inv(gs, gd, r);
      for (int k = 0; k < n/2; k++) exp_q.push_back('{1'b1, k == 0, k == n/2-1, sample_t'(r[2*k]), sample_t'(r[2*k+1])});
      got_q.delete();
      drive(gs, gd);
      for (int k = 0; k < n/2; k++) begin
        int e0, e1;
        e0 = int'(got_q[k].e) - x[2*k];
        e1 = int'(got_q[k].o) - x[2*k+1];
        if (e0 < 0) e0 = -e0;
        if (e1 < 0) e1 = -e1;
        if (e0 > max_err) max_err = e0;
        if (e1 > max_err) max_err = e1;
      end
    end
    checks++;
    if (max_err > 4) begin failures++; $display("FAIL round trip error %0d", max_err); end
    checks++;
    if (n_switch < 2) begin failures++; $display("FAIL mode switch never exercised"); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    $display("round trip max error %0d, mode switches %0d", max_err, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
