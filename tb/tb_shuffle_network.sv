// tb_shuffle_network: writes random rows as 128-bit words (with gaps) and
// reads them back as pairs with out_en toggling at random, in both modes:
// DWT order (x[2k], x[2k+1]) and IDWT order (x[k], x[N/2+k]). Checks the
// pairs, the first/last flags, line_taken, and that wr_ready refuses a
// third row while both buffers are full.
module tb_shuffle_network;
  import dwt_pkg::*;

  localparam int MAX_N = 64;
  localparam int CW = $clog2(MAX_N) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mode_e         mode = MODE_DWT;
  logic [CW-1:0] n_cols;
  logic          wr_valid = 1'b0, wr_ready, out_en = 1'b0, line_taken;
  logic [127:0]  wr_data;
  pair_t         out;
  pair_t         q[$];
  int checks = 0, failures = 0, n_taken = 0, n_full = 0;

  shuffle_network #(.MAX_N(MAX_N)) dut (.clk, .rst_n, .mode, .n_cols, .wr_valid, .wr_data,
                                        .wr_ready, .out_en, .out, .line_taken);

  always @(posedge clk) if (rst_n) begin
    if (line_taken) n_taken++;
    if (out.valid) begin
      pair_t ex;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected pair"); end
      else begin
        ex = q.pop_front();
        if (out.e !== ex.e || out.o !== ex.o || out.sol !== ex.sol || out.eol !== ex.eol) begin
          failures++; $display("FAIL got (%0d,%0d,%b%b) exp (%0d,%0d,%b%b)", out.e, out.o, out.sol, out.eol, ex.e, ex.o, ex.sol, ex.eol);
        end
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

  // Random enable of the output side.
  always @(negedge clk) out_en <= ($urandom_range(99) < 70);

  task automatic write_row(int n);
    int x[];
    x = new[n];
    foreach (x[i]) x[i] = int'($urandom_range(65535)) - 32768;
    for (int k = 0; k < n/2; k++)
      if (mode == MODE_DWT) q.push_back('{1'b1, k == 0, k == n/2-1, sample_t'(x[2*k]), sample_t'(x[2*k+1])});
      else                  q.push_back('{1'b1, k == 0, k == n/2-1, sample_t'(x[k]), sample_t'(x[n/2+k])});
    for (int w = 0; w < n/8; w++) begin
      @(negedge clk);
      while (!wr_ready) begin wr_valid = 1'b0; n_full++; @(negedge clk); end
      wr_valid = 1'b1;
      for (int j = 0; j < 8; j++) wr_data[16*j +: 16] = 16'(x[8*w + j]);
      @(negedge clk) wr_valid = 1'b0;
    end
  endtask

  initial begin
    int rows = 0;
    n_cols = CW'(MAX_N);
    wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 2; m++) begin
      mode = m ? MODE_IDWT : MODE_DWT;
      for (int nsel = 0; nsel < 3; nsel++) begin
        n_cols = CW'(nsel == 0 ? 16 : nsel == 1 ? 40 : 64);
        for (int r = 0; r < 6; r++) begin write_row(n_cols); rows++; end
        while (q.size() != 0) @(negedge clk);
        repeat (4) @(negedge clk);
      end
    end
    checks++;
    if (n_taken != rows) begin failures++; $display("FAIL line_taken %0d of %0d", n_taken, rows); end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL buffers never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
