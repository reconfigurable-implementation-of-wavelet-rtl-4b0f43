// tb_lift_step: checks a predict step (alpha, adding) and an update step
// (delta, subtracting) on random lines, with gaps and back-to-back lines,
// against the lifting equations with symmetric extension worked out here.
// Also checks the latencies: 3 clocks for predict, 2 for update.
module tb_lift_step;
  import dwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pair_t in, out_p, out_u;
  pair_t qp[$], qu[$];
  int checks = 0, failures = 0, cyc = 0, t_in = -1, t_p = -1, t_u = -1;

  lift_step #(.STEP(PREDICT), .COEF(C_ALPHA), .SUB(1'b0)) u_p (.clk, .rst_n, .in, .out(out_p));
  lift_step #(.STEP(UPDATE),  .COEF(C_DELTA), .SUB(1'b1)) u_u (.clk, .rst_n, .in, .out(out_u));

  always @(posedge clk) cyc <= cyc + 1;

  function automatic int fl(longint c, longint v);
    return int'((c * v) >>> 16);
  endfunction

  task automatic cmp(string n, pair_t g, ref pair_t q[$]);
    pair_t ex;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL %s unexpected", n); return; end
    ex = q.pop_front();
    if (g.e !== ex.e || g.o !== ex.o || g.sol !== ex.sol || g.eol !== ex.eol) begin
      failures++; $display("FAIL %s got (%0d,%0d) exp (%0d,%0d)", n, g.e, g.o, ex.e, ex.o);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_p.valid) begin if (t_p < 0) t_p = cyc; cmp("predict", out_p, qp); end
    if (out_u.valid) begin if (t_u < 0) t_u = cyc; cmp("update", out_u, qu); end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      int h, gap;
      int e[], o[];
      h = int'($urandom_range(1, 20));
      gap = (t == 0) ? 0 : 25;
      e = new[h];
      o = new[h];
      foreach (e[k]) begin e[k] = int'($urandom_range(4000)) - 2000; o[k] = int'($urandom_range(4000)) - 2000; end
      for (int k = 0; k < h; k++) begin
        int en, op;
        en = (k + 1 < h) ? e[k+1] : e[k];
        op = (k > 0) ? o[k-1] : o[k];
        qp.push_back('{1'b1, k == 0, k == h-1, sample_t'(e[k]), sample_t'(o[k] + fl(-98304, e[k] + en))});
        qu.push_back('{1'b1, k == 0, k == h-1, sample_t'(e[k] - fl(30720, o[k] + op)), sample_t'(o[k])});
      end
      for (int k = 0; k < h; k++) begin
        while (int'($urandom_range(99)) < gap) @(negedge clk) in = '0;
        @(negedge clk);
        in = '{1'b1, k == 0, k == h-1, sample_t'(e[k]), sample_t'(o[k])};
        if (t_in < 0) t_in = cyc;
      end
      @(negedge clk) in = '0;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (t_p - t_in != 3 || t_u - t_in != 2) begin
      failures++; $display("FAIL latency predict %0d update %0d", t_p - t_in, t_u - t_in);
    end
    checks++;
    if (qp.size() != 0 || qu.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
