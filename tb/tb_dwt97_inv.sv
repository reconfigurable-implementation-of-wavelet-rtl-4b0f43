// tb_dwt97_inv: streams lines of random samples through the forward 9/7
// data path and compares every output pair with the integer reference model.
// Also checks the pipeline latency (12 clocks from pair k in to pair k out,
// i.e. 10 after pair k+2) and the rate of one pair per clock, and that lines
// fed with gaps and back to back give the same results.
module tb_dwt97_inv;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pair_t in, out;
  pair_t exp_q[$];
  int checks = 0, failures = 0;
  int cyc = 0, first_in_cyc = -1, first_out_cyc = -1, last_out_cyc = -1, n_out = 0;

  dwt97_inv dut (.clk, .rst_n, .in, .out);

  always @(posedge clk) cyc <= cyc + 1;

  // Output monitor.
  always @(posedge clk) if (rst_n && out.valid) begin
    pair_t ex;
    if (first_out_cyc < 0) first_out_cyc = cyc;
    last_out_cyc = cyc;
    n_out++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected output");
    end else begin
      ex = exp_q.pop_front();
      if (out.e !== ex.e || out.o !== ex.o || out.sol !== ex.sol || out.eol !== ex.eol) begin
        failures++;
        $display("FAIL got (%0d,%0d,%b%b) exp (%0d,%0d,%b%b)", out.e, out.o, out.sol, out.eol,
                 ex.e, ex.o, ex.sol, ex.eol);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_line(int n, int amp, int gap_pct);
    line_t x, s, d;
    x = new[n];
    foreach (x[i]) x[i] = (amp == 256) ? int'($urandom_range(255)) : int'($urandom_range(2*amp)) - amp;
    s = new[n/2];
    d = new[n/2];
    for (int k = 0; k < n/2; k++) begin s[k] = x[2*k]; d[k] = x[2*k+1]; end
    inv(s, d, x);
    for (int k = 0; k < n/2; k++) begin
      pair_t p;
      p = '{valid:1'b1, sol:(k == 0), eol:(k == n/2-1), e:sample_t'(x[2*k]), o:sample_t'(x[2*k+1])};
      exp_q.push_back(p);
    end
    for (int k = 0; k < n/2; k++) begin
      while (gap_pct > 0 && int'($urandom_range(99)) < gap_pct) begin
        @(negedge clk) in = '0;
      end
      @(negedge clk);
      in = '{valid:1'b1, sol:(k == 0), eol:(k == n/2-1), e:sample_t'(s[k]), o:sample_t'(d[k])};
      if (first_in_cyc < 0) first_in_cyc = cyc;
    end
    @(negedge clk) in = '0;
  endtask

  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Latency and rate: one gap-free 64-sample line of 8-bit pixels.
    send_line(64, 256, 0);
    repeat (20) @(posedge clk);
    checks++;
    if (first_out_cyc - first_in_cyc != 12) begin
      failures++; $display("FAIL latency %0d", first_out_cyc - first_in_cyc);
    end
    checks++;
    if (last_out_cyc - first_out_cyc != 31 || n_out != 32) begin
      failures++; $display("FAIL rate: %0d pairs over %0d clocks", n_out, last_out_cyc - first_out_cyc + 1);
    end
    // Short and long lines, back to back, with and without gaps.
    for (int t = 0; t < 60; t++) begin
      int n;
      n = 2 * int'($urandom_range(1, 40));
      send_line(n, (t % 2) ? 256 : 2000, (t % 3 == 0) ? 0 : 30);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++; $display("FAIL %0d outputs missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
