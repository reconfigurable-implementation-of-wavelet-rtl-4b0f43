// tb_scale_step: checks the forward scaling (even by 1/K, odd by K) and the
// inverse scaling (even by K, odd by 1/K) against floored products worked
// out here, and the 2-clock latency.
module tb_scale_step;
  import dwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pair_t in, out_f, out_i;
  int checks = 0, failures = 0;

  scale_step #(.INVERSE(1'b0)) u_f (.clk, .rst_n, .in, .out(out_f));
  scale_step #(.INVERSE(1'b1)) u_i (.clk, .rst_n, .in, .out(out_i));

  function automatic int fl(longint c, longint v);
    return int'((c * v) >>> 16);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      int e, o;
      e = (t == 0) ? -32768 : (t == 1) ? 28000 : int'($urandom_range(56000)) - 28000;
      o = int'($urandom_range(56000)) - 28000;
      @(negedge clk) in = '{1'b1, 1'b1, 1'b0, sample_t'(e), sample_t'(o)};
      @(negedge clk) in = '0;
      checks++;
      if (out_f.valid || out_i.valid) begin failures++; $display("FAIL early output"); end
      @(negedge clk);
      checks++;
      if (!out_f.valid || !out_f.sol || out_f.e !== sample_t'(fl(57940, e)) || out_f.o !== sample_t'(fl(74127, o)) ||
          !out_i.valid || out_i.e !== sample_t'(fl(74127, e)) || out_i.o !== sample_t'(fl(57940, o))) begin
        failures++;
        $display("FAIL e=%0d o=%0d fwd (%0d,%0d) inv (%0d,%0d)", e, o, out_f.e, out_f.o, out_i.e, out_i.o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
