// tb_transpose_network: sends groups of eight random rows as pair streams
// and drains them with a randomly stalling reader, in both modes. Checks that
// column word j holds sample j of each row, with rows laid out as lows then
// highs (DWT) or re-interleaved (IDWT), plus dcol, group_done and that
// draining drops after the group.
module tb_transpose_network;
  import dwt_pkg::*;

  localparam int MAX_N = 64;
  localparam int CW = $clog2(MAX_N) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mode_e         mode = MODE_DWT;
  logic [CW-1:0] n_cols;
  pair_t         in;
  logic          draining, dv, dr = 1'b0, group_done;
  logic [127:0]  dword;
  logic [CW-1:0] dcol;
  int checks = 0, failures = 0, n_groups = 0, n_stall = 0;
  logic [127:0]  exp_w [$];

  transpose_network #(.MAX_N(MAX_N)) dut (.clk, .rst_n, .mode, .n_cols, .in, .draining, .dv,
                                          .dword, .dcol, .dr, .group_done);

  int jexp = 0;
  always @(posedge clk) if (rst_n) begin
    if (group_done) begin n_groups++; jexp = 0; end
    if (dv && !dr) n_stall++;
    if (dv && dr) begin
      checks++;
      if (exp_w.size() == 0) begin failures++; $display("FAIL unexpected word"); end
      else begin
        logic [127:0] e;
        e = exp_w.pop_front();
        if (dword !== e || int'(dcol) != jexp) begin
          failures++; $display("FAIL col %0d (exp %0d) got %h exp %h", dcol, jexp, dword, e);
        end
      end
      jexp++;
    end
  end

  always @(negedge clk) dr <= ($urandom_range(99) < 60);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic group(int n);
    int x[8][];
    for (int r = 0; r < 8; r++) begin
      x[r] = new[n];
      foreach (x[r][i]) x[r][i] = int'($urandom_range(65535));
    end
    // expected column words: line position j of each row
    for (int j = 0; j < n; j++) begin
      logic [127:0] w;
      for (int r = 0; r < 8; r++) w[16*r +: 16] = 16'(x[r][j]);
      exp_w.push_back(w);
    end
    // the pairs that produce those lines
    for (int r = 0; r < 8; r++)
      for (int k = 0; k < n/2; k++) begin
        @(negedge clk);
        if (mode == MODE_DWT) in = '{1'b1, k == 0, k == n/2-1, sample_t'(x[r][k]), sample_t'(x[r][n/2+k])};
        else                  in = '{1'b1, k == 0, k == n/2-1, sample_t'(x[r][2*k]), sample_t'(x[r][2*k+1])};
      end
    @(negedge clk) in = '0;
    checks++;
    if (!draining) begin failures++; $display("FAIL not draining"); end
    while (draining) @(negedge clk);
  endtask

  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 2; m++) begin
      mode = m ? MODE_IDWT : MODE_DWT;
      n_cols = CW'(16); group(16);
      n_cols = CW'(40); group(40);
      n_cols = CW'(64); group(64);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (n_groups != 6 || exp_w.size() != 0) begin failures++; $display("FAIL groups %0d left %0d", n_groups, exp_w.size()); end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL reader never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
